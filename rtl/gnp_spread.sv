// gnp_spread: serial generic node processor with spread (on-demand) update,
// total-sum scheme, sum operator.
//
// The processor holds one message per port j = 0..D-1. Each cycle it can
// take one new input message (in_valid, in_idx, in_e) and answer one output
// request (rq_idx -> rq_s = sum over the other ports, combinational), in any
// order the schedule asks for.
//  MODE = SPREAD_STRAIGHT: one memory. A new input replaces the previous
//    message of its port at once, so the next request already uses it (the
//    update used by shuffled schedules).
//  MODE = SPREAD_DELAYED: two memories. New inputs go to the input memory
//    while requests are answered from the compute memory; after D inputs
//    (every port written once) the roles of the two memories swap, which is
//    signalled by a one-cycle pulse on swapped.
// Totals are recomputed combinationally from the memory answering requests.
// clr zeroes both memories and the input count. The two modes follow the
// source method's description; the port handshake is this design's.
module gnp_spread
  import ldpc_pkg::*;
#(
  parameter int  D    = 6,
  parameter int  WI   = 6,
  parameter bit  MODE = 1'b0,   // 0 = straight, 1 = delayed
  localparam int WO   = WI + $clog2(D) + 1,
  localparam int IW   = (D > 1) ? $clog2(D) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clr,
  input  logic                 in_valid,
  input  logic [IW-1:0]        in_idx,
  input  logic signed [WI-1:0] in_e,
  input  logic [IW-1:0]        rq_idx,
  output logic signed [WO-1:0] rq_s,
  output logic                 swapped
);
  localparam bit SPREAD_STRAIGHT = 1'b0;

  logic signed [WI-1:0] bank [2][D];
  logic                 csel;      // bank answering requests
  logic [IW-1:0]        icnt;
  logic [D-1:0]         written;   // ports written in this round (delayed mode)
  logic                 wsel;      // bank taking inputs
  logic signed [WO-1:0] total;

  assign wsel = (MODE == SPREAD_STRAIGHT) ? csel : ~csel;

  always_comb begin
    total = '0;
    for (int j = 0; j < D; j++) total = total + WO'(bank[csel][j]);
    rq_s = total - WO'(bank[csel][rq_idx]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < 2; b++) for (int j = 0; j < D; j++) bank[b][j] <= '0;
      csel    <= 1'b0;
      icnt    <= '0;
      written <= '0;
      swapped <= 1'b0;
    end else if (clr) begin
      for (int b = 0; b < 2; b++) for (int j = 0; j < D; j++) bank[b][j] <= '0;
      csel    <= 1'b0;
      icnt    <= '0;
      written <= '0;
      swapped <= 1'b0;
    end else begin
      swapped <= 1'b0;
      if (in_valid) begin
        bank[wsel][in_idx] <= in_e;
        if (MODE != SPREAD_STRAIGHT) begin
          if (icnt == IW'(D - 1)) begin
            icnt    <= '0;
            written <= '0;
            csel    <= ~csel;
            swapped <= 1'b1;
          end else begin
            icnt    <= icnt + 1'b1;
            written <= written | (D'(1) << in_idx);
          end
        end
      end
    end
  end

  // Delayed mode: each port is written once per round.
  a_once: assert property (@(posedge clk) disable iff (!rst_n)
    (in_valid && !clr && MODE != SPREAD_STRAIGHT) |-> !written[in_idx])
    else $error("port written twice in one round");
endmodule
