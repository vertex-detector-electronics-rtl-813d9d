// slink_tx: link control logic between an output FIFO and an S-LINK
// link source card (LSC).
//
// An event is sent only once it is complete in the output FIFO: the event
// builder pushes the length of each finished event into a length queue,
// and the sender then moves that many words to the LSC, one per clock, on
// UD<31..0> with UWEN# low.  It pauses while LFF# (link full) is low or
// the link is down (LDOWN# low).
//
// Link re-initialisation: a pulse on link_reset (from the ECS) makes the
// sender finish the event in progress, then drive URESET# low, wait for
// the LSC to pull LDOWN# low and release it again after its
// initialisation, and then set URESET# high again.
//
// Timing: UD/UWEN# are registered and follow the FIFO read by one clock.
// The length queue and holding URESET# until LDOWN# returns high follow
// the description of the link; the rest of the S-LINK protocol (control
// words, return lines) is not modelled.
module slink_tx (
  input  logic        clk,
  input  logic        rst_n,
  // output FIFO (first-word fall-through)
  input  logic [31:0] fifo_data,
  input  logic        fifo_empty,
  output logic        fifo_rd,
  // event length queue
  input  logic [15:0] len_data,
  input  logic        len_empty,
  output logic        len_rd,
  // ECS request
  input  logic        link_reset,
  // S-LINK LSC
  output logic [31:0] ud,
  output logic        uwen_n,
  input  logic        lff_n,
  input  logic        ldown_n,
  output logic        ureset_n,
  // monitoring
  output logic [31:0] n_sent,
  output logic        in_reset
);
  typedef enum logic [2:0] {T_IDLE, T_SEND, T_RST_LO, T_RST_WAIT} tstate_t;
  tstate_t     st;
  logic [15:0] left;
  logic        rst_req;
  logic        can_send;

  assign can_send = (st == T_SEND) && left != 0 && lff_n && ldown_n && !fifo_empty;
  assign fifo_rd  = can_send;
  assign len_rd   = (st == T_IDLE) && !rst_req && !len_empty && ldown_n;
  assign in_reset = (st == T_RST_LO) || (st == T_RST_WAIT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= T_IDLE;
      left     <= '0;
      rst_req  <= 1'b0;
      ud       <= '0;
      uwen_n   <= 1'b1;
      ureset_n <= 1'b1;
      n_sent   <= '0;
    end else begin
      uwen_n <= 1'b1;
      if (link_reset) rst_req <= 1'b1;
      case (st)
        T_IDLE: begin
          if (rst_req) begin
            ureset_n <= 1'b0;
            st       <= T_RST_LO;
          end else if (len_rd) begin
            left <= len_data;
            st   <= (len_data == 16'd0) ? T_IDLE : T_SEND;
          end
        end
        T_SEND: begin
          if (can_send) begin
            ud     <= fifo_data;
            uwen_n <= 1'b0;
            left   <= left - 1'b1;
            if (left == 16'd1) begin
              st     <= T_IDLE;
              n_sent <= n_sent + 1;
            end
          end
        end
        T_RST_LO:   if (!ldown_n) st <= T_RST_WAIT;
        T_RST_WAIT: if (ldown_n) begin
          ureset_n <= 1'b1;
          rst_req  <= 1'b0;
          st       <= T_IDLE;
        end
        default: st <= T_IDLE;
      endcase
    end
  end
endmodule
