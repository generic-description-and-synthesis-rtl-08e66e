// gnp_total_sum_serial: serial generic node processor, total-sum scheme,
// grouped update, operator = signed sum.
//
// The D messages of one node arrive one per cycle. They are accumulated into
// a running total and kept in a D-entry input buffer. When the D-th message
// of a group is taken, the total and the buffer move to the output stage in
// one step (the grouped update: outputs only after all inputs were sampled),
// and over the next D cycles the output stage emits s_i = s - e_i, one per
// cycle, in arrival order. Meanwhile the input stage already accumulates the
// next group, so groups may follow back to back (one group every D cycles)
// or with gaps.
// Timing: output i of a group appears D cycles after input i when groups
// are back to back; out_first marks output 0 and out_last output D-1.
// out_total carries s for the whole output group.
// clr restarts the input count (synchronous). A group completing while the
// output stage still has more than one output to go is an overrun (asserted).
// The scheme follows the serial total-sum processor of the source method;
// buffer organisation and handshake are this design's choices.
module gnp_total_sum_serial #(
  parameter int  D  = 3,
  parameter int  WI = 6,
  localparam int WO = WI + $clog2(D) + 1,
  localparam int CW = (D > 1) ? $clog2(D) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clr,
  input  logic                 in_valid,
  input  logic signed [WI-1:0] in_e,
  output logic                 out_valid,
  output logic                 out_first,
  output logic                 out_last,
  output logic signed [WO-1:0] out_s,
  output logic signed [WO-1:0] out_total
);
  // input stage
  logic [CW-1:0]        icnt;
  logic signed [WO-1:0] acc;
  logic signed [WI-1:0] ibuf [D];
  // output stage
  logic                 obusy;
  logic [CW-1:0]        ocnt;
  logic signed [WO-1:0] total_r;
  logic signed [WI-1:0] obuf [D];

  logic group_done;
  assign group_done = in_valid && (icnt == CW'(D - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      icnt <= '0;
      acc  <= '0;
      for (int i = 0; i < D; i++) ibuf[i] <= '0;
    end else if (clr) begin
      icnt <= '0;
      acc  <= '0;
    end else if (in_valid) begin
      ibuf[icnt] <= in_e;
      if (group_done) begin
        icnt <= '0;
        acc  <= '0;
      end else begin
        icnt <= icnt + 1'b1;
        acc  <= acc + WO'(in_e);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      obusy   <= 1'b0;
      ocnt    <= '0;
      total_r <= '0;
      for (int i = 0; i < D; i++) obuf[i] <= '0;
    end else if (group_done && !clr) begin
      obusy   <= 1'b1;
      ocnt    <= '0;
      total_r <= acc + WO'(in_e);
      for (int i = 0; i < D - 1; i++) obuf[i] <= ibuf[i];
      obuf[D-1] <= in_e;
    end else if (obusy) begin
      if (ocnt == CW'(D - 1)) obusy <= 1'b0;
      ocnt <= ocnt + 1'b1;
    end
  end

  assign out_valid = obusy;
  assign out_first = obusy && (ocnt == '0);
  assign out_last  = obusy && (ocnt == CW'(D - 1));
  assign out_s     = total_r - WO'(obuf[ocnt]);
  assign out_total = total_r;

  // A new group may only take over the output stage on its last output.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    (group_done && !clr) |-> (!obusy || ocnt == CW'(D - 1)))
    else $error("serial processor overrun");
endmodule
