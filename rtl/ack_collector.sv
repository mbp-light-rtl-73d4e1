// ack_collector: the Ack Collector of the RDT Interface.
//
// It collects the acknowledgment (ack) and not-acknowledgment (nack) packets
// that return after this cluster has sent a coherent message, so that the
// core does not have to handle each of them. The core arms one of SLOTS
// slots with the number of replies it expects (the slot number travels in
// the message header and comes back in each reply). Every reply for a slot
// increments its counter; a nack also sets the slot's nack bit. A slot is
// done when it is armed and its count equals the expected number. Arming a
// slot clears its counter and nack bit. Replies are counted one per cycle;
// done and nack follow the clock edge after the reply. The design
// description only names this block and says it collects acknowledgment
// packets; the slot organisation is this implementation's choice.
module ack_collector #(
  parameter int SLOTS = 16,
  parameter int CNT_W = 8,
  localparam int SW   = $clog2(SLOTS)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             arm_en,
  input  logic [SW-1:0]    arm_slot,
  input  logic [CNT_W-1:0] arm_expected,
  input  logic             in_valid,
  input  logic [SW-1:0]    in_slot,
  input  logic             in_nack,
  output logic [SLOTS-1:0] done,
  output logic [SLOTS-1:0] nack_seen
);
  logic [CNT_W-1:0] count    [SLOTS];
  logic [CNT_W-1:0] expected [SLOTS];
  logic [SLOTS-1:0] armed;

  always_ff @(posedge clk) begin
    if (rst) begin
      armed     <= '0;
      nack_seen <= '0;
      for (int i = 0; i < SLOTS; i++) begin
        count[i]    <= '0;
        expected[i] <= '0;
      end
    end else begin
      if (in_valid) begin
        count[in_slot] <= count[in_slot] + 1'b1;
        if (in_nack) nack_seen[in_slot] <= 1'b1;
      end
      if (arm_en) begin          // arming wins over a reply in the same cycle
        armed[arm_slot]     <= 1'b1;
        expected[arm_slot]  <= arm_expected;
        count[arm_slot]     <= '0;
        nack_seen[arm_slot] <= 1'b0;
      end
    end
  end

  always_comb begin
    for (int i = 0; i < SLOTS; i++) done[i] = armed[i] && (count[i] == expected[i]);
  end
endmodule
