// mbp_pkg: constants, opcodes and encodings shared by the MBP-light blocks.
//
// The sizes that come from the design description are the 16-bit data path,
// 21-bit instructions, 16 general purpose registers, 112 packet buffer
// registers (PBRs) of 68 bits, a 21-bit x 64K local memory, a 64K I/O space,
// a 512-entry Net Cache, four processors on the cluster bus and 256 clusters. Everything else here is this
// implementation's own choice: the instruction encoding, the grouping of the
// PBRs into four sets of 28 flits, the RDT flit header layout, the cache line
// size, the tag states and the internal I/O register map.
package mbp_pkg;

  // ---------------- core ----------------
  localparam int GPR_W    = 16;
  localparam int INSTR_W  = 21;
  localparam int NUM_GPR  = 16;
  localparam int LM_DEPTH = 65536;
  localparam int LM_AW    = 16;

  // ---------------- packet buffer registers ----------------
  localparam int NUM_PBR   = 112;
  localparam int PBR_W     = 68;      // 64 data bits + 4 protocol tag bits
  localparam int PBR_AW    = 7;
  localparam int PBR_SETS  = 4;
  localparam int SET_FLITS = NUM_PBR / PBR_SETS;   // 28
  localparam int RX_SETS   = 3;       // sets 0..2 form the RDT cyclic buffer

  typedef logic [PBR_W-1:0]  flit_t;
  typedef logic [PBR_AW-1:0] pbr_idx_t;

  // ---------------- instruction set ----------------
  // [20:16] opcode, [15:12] rd, [11:8] ra, [7:4] rb, [7:0] imm8,
  // [11:0] imm12 (LDI), [15:0] imm16 (JMP), [2:0] PBR field select.
  typedef enum logic [4:0] {
    OP_NOP  = 5'd0,  OP_ADD  = 5'd1,  OP_SUB  = 5'd2,  OP_AND  = 5'd3,
    OP_OR   = 5'd4,  OP_XOR  = 5'd5,  OP_SHL  = 5'd6,  OP_SHR  = 5'd7,
    OP_ADDI = 5'd8,  OP_LDI  = 5'd9,  OP_LDIH = 5'd10, OP_LD   = 5'd11,
    OP_ST   = 5'd12, OP_IN   = 5'd13, OP_OUT  = 5'd14, OP_BEQZ = 5'd15,
    OP_BNEZ = 5'd16, OP_JMP  = 5'd17, OP_JR   = 5'd18, OP_PLD  = 5'd19,
    OP_PST  = 5'd20, OP_PMOV = 5'd21, OP_XFER = 5'd22, OP_RETI = 5'd23,
    OP_HALT = 5'd24, OP_PEQ  = 5'd25
  } opcode_e;

  // XFER command, instruction bits [7:5]
  typedef enum logic [2:0] {
    XF_CM_TO_PBR  = 3'd0,   // cluster memory -> PBRs
    XF_PBR_TO_CM  = 3'd1,   // PBRs -> cluster memory
    XF_PBR_TO_BUS = 3'd2,   // PBRs -> cluster bus (reply to the held read)
    XF_BUS_TO_PBR = 3'd3,   // cluster bus (held write) -> PBRs
    XF_TAG_TO_PBR = 3'd4,   // tags of consecutive lines -> PBR bits [1:0]
    XF_PBR_TO_TAG = 3'd5    // PBR bits [1:0] -> tags of consecutive lines
  } xfer_cmd_e;

  typedef struct packed {
    xfer_cmd_e     cmd;
    pbr_idx_t      start;
    logic [4:0]    len;
    logic [15:0]   line;    // cluster memory line number
  } xfer_req_t;

  localparam logic [15:0] IRQ_VECTOR = 16'h0004;

  // ---------------- I/O space ----------------
  // 0xFF00..0xFFFF is decoded inside the chip, the rest goes to the pins.
  localparam logic [15:0] IO_INT_BASE = 16'hFF00;
  // RDT Interface registers
  localparam logic [7:0] R_RX_STATUS  = 8'h00; // rd: [15] valid [9:8] set [4:0] length
  localparam logic [7:0] R_RX_RELEASE = 8'h01; // wr: [1:0] set
  localparam logic [7:0] R_TX_SEND    = 8'h02; // wr: [1:0] set, [12:8] length
  localparam logic [7:0] R_SET_STATE  = 8'h03; // rd: 2 bits per set
  localparam logic [7:0] R_NC_ADDR_LO = 8'h10; // wr
  localparam logic [7:0] R_NC_ADDR_HI = 8'h11; // wr
  localparam logic [7:0] R_NC_WRITE   = 8'h12; // wr: [1] valid [0] cached
  localparam logic [7:0] R_AM_BITMAP  = 8'h13; // wr
  localparam logic [7:0] R_AM_WRITE   = 8'h14; // wr: [8] valid [7:0] cluster
  localparam logic [7:0] R_AG_COUNT   = 8'h15; // rd: [15:8] acks [7:0] nacks generated
  localparam logic [7:0] R_AC_ARM     = 8'h18; // wr: [15:12] slot [7:0] expected
  localparam logic [7:0] R_AC_DONE    = 8'h19; // rd: done bit per slot
  localparam logic [7:0] R_AC_NACK    = 8'h1A; // rd: nack-seen bit per slot
  // MMC registers
  localparam logic [7:0] R_MMC_REQ_LO = 8'h20; // rd: held bus request line [15:0]
  localparam logic [7:0] R_MMC_REQ_HI = 8'h21; // rd: [15] held [14] write [5:0] line[21:16]
  localparam logic [7:0] R_MMC_TAG_LO = 8'h22; // wr: tag line [15:0]
  localparam logic [7:0] R_MMC_TAG_HI = 8'h23; // wr: tag line [21:16]
  localparam logic [7:0] R_MMC_TAG_WR = 8'h24; // wr: [1:0] new tag state
  localparam logic [7:0] R_MMC_RESUME = 8'h26; // wr: re-check the held request
  localparam logic [7:0] R_MMC_IRQACK = 8'h27; // wr: acknowledge the interrupt

  // ---------------- cluster memory and bus ----------------
  localparam int BUS_MASTERS = 4;   // L2 caches on the cluster bus
  localparam int LINE_BEATS = 4;    // 64-bit beats per cache line
  localparam int LINE_AW    = 22;   // cluster memory line address
  localparam int CM_AW      = LINE_AW + 2;

  typedef enum logic [1:0] {
    TAG_INVALID   = 2'd0,   // not in cluster memory: core software
    TAG_SHARED    = 2'd1,   // readable copy: reads served by hardware
    TAG_EXCLUSIVE = 2'd2,   // owned: reads and writes served by hardware
    TAG_TRAP      = 2'd3    // always handed to core software
  } tag_state_e;

  // ---------------- RDT packets ----------------
  localparam int CLUSTER_W = 8;      // 256 clusters
  localparam int DSM_AW    = 32;     // DSM line address in a header
  localparam int AC_SLOTS  = 16;
  localparam int NC_ENTRIES = 512;
  localparam int AM_ENTRIES = 64;
  localparam int BITMAP_W   = 16;

  typedef enum logic [3:0] {
    PT_DATA     = 4'd0,   // ordinary packet, handed to the core
    PT_COHERENT = 4'd1,   // coherent message: to the core and Ack Generator
    PT_ACK      = 4'd2,   // acknowledgment, consumed by the Ack Collector
    PT_NACK     = 4'd3    // not-acknowledgment, consumed by the Ack Collector
  } pkt_type_e;

  // Payload of a header flit (bits [63:0]); bits [67:64] are protocol tags.
  typedef struct packed {
    pkt_type_e              ptype;   // [63:60]
    logic [CLUSTER_W-1:0]   src;     // [59:52]
    logic [CLUSTER_W-1:0]   dst;     // [51:44]
    logic [3:0]             slot;    // [43:40] ack collector slot
    logic [7:0]             rsvd;    // [39:32]
    logic [DSM_AW-1:0]      addr;    // [31:0]
  } hdr_t;

  typedef enum logic [1:0] {
    SET_FREE = 2'd0,   // owned by the receiver (set 3: owned by the core)
    SET_FULL = 2'd1,   // holds a received packet, owned by the core
    SET_SEND = 2'd2    // being sent by the packet handler
  } set_state_e;

  // event counters brought out of the chip for observation
  typedef struct packed {
    logic [15:0] retired;        // instructions completed by the core
    logic [15:0] sb_stalls;      // cycles stalled on a busy PBR
    logic [15:0] load_stalls;    // load-use stall cycles
    logic [15:0] irqs;           // interrupts taken
    logic [15:0] overtakes;      // instructions completed while a transfer was busy
    logic [15:0] hw_served;      // bus requests served by the MMC alone
    logic [15:0] held;           // bus requests handed to the core
    logic [15:0] bus_conflicts;  // bus grants made while another master waited
    logic [7:0]  rx_pkts;        // packets received
    logic [7:0]  tx_pkts;        // packets sent
    logic [7:0]  rx_stalls;      // cycles a header waited for a free set
    logic [7:0]  ack_gen;        // acks generated in hardware
    logic [7:0]  nack_gen;       // nacks generated in hardware
    logic [7:0]  ag_miss;        // coherent messages left to software
  } mbp_stats_t;

endpackage
