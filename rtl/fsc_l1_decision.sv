// fsc_l1_decision: L1 accept generation of the fast and slow control FPGA.
//
// L1 trigger decisions arrive in the order of the L0 accepted events.
// The block counts decisions since the last L1_Reset; the count, modulo
// 2^PTR_W, is the slot of that event in the L1 buffer, because the
// preprocessor FPGAs store the k-th L0 accepted event since L1_Reset in
// slot k.  An accepting decision is passed to the DSPs as one strobe with
// the five decision bits CMD<6..2> and the 11-bit slot pointer.
//
// Which trigger types mean "accept" is not given by the board
// description; here a decision whose trigger type CMD<6..4> is non-zero is
// an accept and type 000 is a reject (this design's choice).
//
// Timing: l1a_valid follows l1_dec_valid by one clock.
module fsc_l1_decision #(
  parameter int unsigned PTR_W = 11
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             l1_reset,
  input  logic             l1_dec_valid,
  input  logic [2:0]       l1_dec_type,
  input  logic [1:0]       l1_dec_l0id,
  output logic             l1a_valid,
  output logic [4:0]       l1a_info,    // CMD<6..2>
  output logic [PTR_W-1:0] l1a_ptr,
  output logic [31:0]      n_decisions, // for ECS monitoring
  output logic [31:0]      n_accepts
);
  logic [PTR_W-1:0] slot;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot        <= '0;
      l1a_valid   <= 1'b0;
      l1a_info    <= '0;
      l1a_ptr     <= '0;
      n_decisions <= '0;
      n_accepts   <= '0;
    end else if (l1_reset) begin
      slot        <= '0;
      l1a_valid   <= 1'b0;
      n_decisions <= '0;
      n_accepts   <= '0;
    end else begin
      l1a_valid <= 1'b0;
      if (l1_dec_valid) begin
        slot        <= slot + 1'b1;
        n_decisions <= n_decisions + 1;
        if (l1_dec_type != 3'b000) begin
          l1a_valid <= 1'b1;
          l1a_info  <= {l1_dec_type, l1_dec_l0id};
          l1a_ptr   <= slot;
          n_accepts <= n_accepts + 1;
        end
      end
    end
  end
endmodule
