// packet_handler: the Packet Handler of the RDT Interface.
//
// Receive: packets arrive from the RDT router one 68-bit flit per cycle
// (valid/ready, last marks the final flit). The first flit is the header.
// Ack and nack packets are not stored: their slot and kind go to the Ack
// Collector and the rest of the packet is dropped. Every other packet is
// written flit by flit into a PBR set: sets 0, 1 and 2 (28 PBRs each) are
// used in turn as a cyclic buffer, so the core can work on one set while the
// next packet lands in another. A set must be FREE to receive; otherwise the
// link is held (in_ready low). Flits past the 28th are dropped. When the last
// flit is written the set becomes FULL and its length is recorded. A
// coherent-message header is also handed to the Ack Generator in the cycle it
// is accepted (the header waits while the Ack Generator is busy).
//
// Core side: the core sees the oldest FULL set (rx_head_*) and either
// releases it (back to FREE) or turns it, or set 3, into an outgoing packet
// with a length (SEND). Both advance the head when they name it.
//
// Send: between packets, a waiting Ack Generator reply goes first; otherwise
// SEND sets are sent in round-robin order, one flit per cycle from the PBRs,
// after which the set is FREE again (set 3 returns to the core).
//
// The three-set cyclic buffer and the split of the RDT Interface follow the
// design description; the link handshake, header layout, set states and
// arbitration are this implementation's choices.
module packet_handler
  import mbp_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // RDT router link
  input  logic        in_valid,
  output logic        in_ready,
  input  flit_t       in_flit,
  input  logic        in_last,
  output logic        out_valid,
  input  logic        out_ready,
  output flit_t       out_flit,
  output logic        out_last,
  // PBR port
  output pbr_idx_t    p_raddr,
  input  flit_t       p_rdata,
  output logic        p_we,
  output pbr_idx_t    p_waddr,
  output flit_t       p_wdata,
  // Ack Generator
  output logic        lk_valid,
  input  logic        lk_ready,
  output hdr_t        lk_hdr,
  input  logic        ag_valid,
  output logic        ag_ready,
  input  flit_t       ag_flit,
  input  logic        ag_last,
  // Ack Collector
  output logic        ac_valid,
  output logic [3:0]  ac_slot,
  output logic        ac_nack,
  // core control
  input  logic        rel_en,
  input  logic [1:0]  rel_set,
  input  logic        send_en,
  input  logic [1:0]  send_set,
  input  logic [4:0]  send_len,
  output logic        rx_head_valid,
  output logic [1:0]  rx_head_set,
  output logic [4:0]  rx_head_len,
  output set_state_e  set_state [PBR_SETS],
  // statistics
  output logic [7:0]  n_rx_pkts,
  output logic [7:0]  n_tx_pkts,
  output logic [7:0]  n_rx_stalls
);
  function automatic pbr_idx_t base_of(logic [1:0] s);
    return pbr_idx_t'(32'(s) * SET_FLITS);
  endfunction

  function automatic logic [1:0] next_rx(logic [1:0] s);
    return (s == 2'(RX_SETS - 1)) ? 2'd0 : s + 2'd1;
  endfunction

  logic [4:0] set_len [PBR_SETS];
  logic [1:0] rx_ptr, head;

  // ---------------- receive ----------------
  typedef enum logic [1:0] {RX_HDR, RX_BODY, RX_DROP} rx_e;
  rx_e        rx_st;
  logic [4:0] rx_cnt;
  hdr_t       in_hdr;
  assign in_hdr = hdr_t'(in_flit[63:0]);

  wire hdr_is_ack = (in_hdr.ptype == PT_ACK) || (in_hdr.ptype == PT_NACK);
  wire hdr_is_coh = (in_hdr.ptype == PT_COHERENT);
  wire set_free   = (set_state[rx_ptr] == SET_FREE);

  always_comb begin
    in_ready = 1'b0;
    case (rx_st)
      RX_HDR:  in_ready = hdr_is_ack || (set_free && (!hdr_is_coh || lk_ready));
      default: in_ready = 1'b1;
    endcase
  end

  wire acc = in_valid && in_ready;

  // offered to the Ack Generator only when the header can be stored too, so
  // lk_valid && lk_ready is exactly the cycle the header is accepted
  assign lk_valid = (rx_st == RX_HDR) && in_valid && hdr_is_coh && set_free;
  assign lk_hdr   = in_hdr;

  assign ac_valid = acc && (rx_st == RX_HDR) && hdr_is_ack;
  assign ac_slot  = in_hdr.slot;
  assign ac_nack  = (in_hdr.ptype == PT_NACK);

  wire [4:0] wr_cnt = (rx_st == RX_HDR) ? 5'd0 : rx_cnt;   // flit position in the packet
  assign p_we    = acc && (rx_st != RX_DROP) && !((rx_st == RX_HDR) && hdr_is_ack)
                   && (32'(wr_cnt) < SET_FLITS);
  assign p_waddr = base_of(rx_ptr) + pbr_idx_t'(wr_cnt);
  assign p_wdata = in_flit;

  wire rx_done = acc && in_last && (rx_st != RX_DROP) && !((rx_st == RX_HDR) && hdr_is_ack);
  wire [4:0] rx_len = (32'(wr_cnt) < SET_FLITS) ? wr_cnt + 5'd1 : 5'(SET_FLITS);

  // ---------------- send ----------------
  typedef enum logic [1:0] {TX_IDLE, TX_ACK, TX_PBR} tx_e;
  tx_e        tx_st;
  logic [1:0] tx_set, tx_rr;
  logic [4:0] tx_cnt;
  logic       pick_valid;
  logic [1:0] pick_set;

  always_comb begin
    pick_valid = 1'b0;
    pick_set   = '0;
    for (int k = PBR_SETS - 1; k >= 0; k--) begin
      if (set_state[2'(tx_rr + 2'(k))] == SET_SEND) begin
        pick_valid = 1'b1;
        pick_set   = 2'(tx_rr + 2'(k));
      end
    end
  end

  wire [4:0] tx_len  = (set_len[tx_set] == 0) ? 5'd1 : set_len[tx_set];
  assign p_raddr   = base_of(tx_set) + pbr_idx_t'(tx_cnt);
  assign out_valid = (tx_st == TX_ACK) ? ag_valid : (tx_st == TX_PBR);
  assign out_flit  = (tx_st == TX_ACK) ? ag_flit  : p_rdata;
  assign out_last  = (tx_st == TX_ACK) ? ag_last  : (tx_cnt == tx_len - 5'd1);
  assign ag_ready  = (tx_st == TX_ACK) && out_ready;
  wire   tx_done   = (tx_st == TX_PBR) && out_ready && out_last;

  // ---------------- state ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      rx_st <= RX_HDR;
      rx_cnt <= '0;
      rx_ptr <= '0;
      head   <= '0;
      tx_st  <= TX_IDLE;
      tx_set <= '0;
      tx_rr  <= '0;
      tx_cnt <= '0;
      n_rx_pkts   <= '0;
      n_tx_pkts   <= '0;
      n_rx_stalls <= '0;
      for (int s = 0; s < PBR_SETS; s++) begin
        set_state[s] <= SET_FREE;
        set_len[s]   <= '0;
      end
    end else begin
      // receive
      if (rx_st == RX_HDR && in_valid && !in_ready) n_rx_stalls <= n_rx_stalls + 1'b1;
      if (acc) begin
        case (rx_st)
          RX_HDR: begin
            rx_cnt <= 5'd1;
            if (!in_last) rx_st <= hdr_is_ack ? RX_DROP : RX_BODY;
          end
          RX_BODY: begin
            if (32'(rx_cnt) < SET_FLITS) rx_cnt <= rx_cnt + 5'd1;
            if (in_last) rx_st <= RX_HDR;
          end
          default: if (in_last) rx_st <= RX_HDR;
        endcase
      end
      if (rx_done) begin
        set_state[rx_ptr] <= SET_FULL;
        set_len[rx_ptr]   <= rx_len;
        rx_ptr            <= next_rx(rx_ptr);
        n_rx_pkts         <= n_rx_pkts + 1'b1;
      end
      // core
      if (rel_en) begin
        set_state[rel_set] <= SET_FREE;
        if (rel_set == head) head <= next_rx(head);
      end
      if (send_en) begin
        set_state[send_set] <= SET_SEND;
        set_len[send_set]   <= send_len;
        if (send_set == head) head <= next_rx(head);
      end
      // send
      case (tx_st)
        TX_IDLE: begin
          if (ag_valid) tx_st <= TX_ACK;
          else if (pick_valid) begin
            tx_st  <= TX_PBR;
            tx_set <= pick_set;
            tx_cnt <= '0;
            tx_rr  <= pick_set + 2'd1;
          end
        end
        TX_ACK: if (ag_valid && out_ready && ag_last) begin
          tx_st     <= TX_IDLE;
          n_tx_pkts <= n_tx_pkts + 1'b1;
        end
        TX_PBR: if (out_ready) begin
          tx_cnt <= tx_cnt + 5'd1;
          if (tx_done) begin
            tx_st             <= TX_IDLE;
            set_state[tx_set] <= SET_FREE;
            n_tx_pkts         <= n_tx_pkts + 1'b1;
          end
        end
        default: tx_st <= TX_IDLE;
      endcase
    end
  end

  assign rx_head_set   = head;
  assign rx_head_valid = (set_state[head] == SET_FULL);
  assign rx_head_len   = set_len[head];

  // a flit offered to the router stays offered until it is taken
  property p_out_hold;
    @(posedge clk) disable iff (rst) out_valid && !out_ready |=> out_valid;
  endproperty
  assert property (p_out_hold);
endmodule
