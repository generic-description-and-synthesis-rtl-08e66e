// vss_controller: sequencer of the vertical-shuffle decoder.
//
// Phases of one codeword:
//  LOAD   NB input beats (one block column of Z LLRs each) are written into
//         the intrinsic memories; the first beat clears the check memories.
//  PASS   the block columns are visited in order 0..NB-1 and, for each, its
//         MB edges (block rows 0..MB-1) are read on consecutive cycles. The
//         first pass is the initialization pass (init = 1: messages from the
//         checks are forced to 0, so every Q_nm becomes f(I_n) and R_m the
//         sum of them); every later pass is one decoding iteration.
//         The write-back of an edge follows its read by exactly MB cycles,
//         the latency of the serial variable processor; wr_* is rd_* delayed
//         through an MB-stage shift register.
//         mode_exact = 0: columns follow back to back, one column every MB
//         cycles (full rate, the next column reads a check before the
//         previous column's update of that same check has landed).
//         mode_exact = 1: each column waits until the previous one is written
//         back (2*MB cycles per column), which is the vertical shuffle
//         schedule exactly.
//  DRAIN  after the last column, wait until all write-backs are done, then
//         stop if the syndrome is zero or IMAX iterations were run, else run
//         another pass.
//  OUT    NB output beats of hard decisions, with out_ready back-pressure.
// The phase order follows the source method's hardware algorithm; the
// handshakes, the init pass, the mode input and the syndrome stop rule are
// this design's choices.
module vss_controller #(
  parameter int  MB   = 3,
  parameter int  NB   = 6,
  parameter int  IMAX = 20,
  localparam int RBW  = (MB > 1) ? $clog2(MB) : 1,
  localparam int CBW  = (NB > 1) ? $clog2(NB) : 1,
  localparam int IW   = $clog2(IMAX + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           mode_exact,
  // input beats
  input  logic           in_valid,
  output logic           in_ready,
  output logic           load_en,
  output logic [CBW-1:0] load_col,
  output logic           clr,
  // edge read / write control
  output logic           rd_valid,
  output logic [RBW-1:0] rd_row,
  output logic [CBW-1:0] rd_col,
  output logic           rd_init,
  output logic           syn_clr,
  output logic           wr_valid,
  output logic [RBW-1:0] wr_row,
  output logic [CBW-1:0] wr_col,
  input  logic           syn_zero,
  // output beats
  output logic           out_valid,
  input  logic           out_ready,
  output logic [CBW-1:0] out_col,
  output logic           out_last,
  output logic [IW-1:0]  iters,
  output logic           converged
);
  typedef enum logic [1:0] {S_LOAD, S_PASS, S_DRAIN, S_OUT} state_e;
  state_e state;

  logic [CBW-1:0] col;
  logic [RBW-1:0] row;
  logic [RBW:0]   gap;       // idle cycles left before the next column (exact mode)
  logic           init_pass;
  logic           exact_r;
  logic           first_rd;

  // write-back pipeline: rd_* delayed by MB cycles
  logic           pv [MB];
  logic [RBW-1:0] pr [MB];
  logic [CBW-1:0] pc [MB];
  logic           pipe_busy;

  assign in_ready = (state == S_LOAD);
  assign load_en  = in_ready && in_valid;
  assign load_col = col;
  assign clr      = load_en && (col == '0);

  assign rd_valid = (state == S_PASS) && (gap == '0);
  assign rd_row   = row;
  assign rd_col   = col;
  assign rd_init  = init_pass;
  assign syn_clr  = rd_valid && first_rd;

  assign wr_valid = pv[MB-1];
  assign wr_row   = pr[MB-1];
  assign wr_col   = pc[MB-1];

  assign out_valid = (state == S_OUT);
  assign out_col   = col;
  assign out_last  = out_valid && (col == CBW'(NB - 1));

  always_comb begin
    pipe_busy = 1'b0;
    for (int k = 0; k < MB; k++) if (pv[k]) pipe_busy = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < MB; k++) begin
        pv[k] <= 1'b0; pr[k] <= '0; pc[k] <= '0;
      end
    end else begin
      pv[0] <= rd_valid; pr[0] <= rd_row; pc[0] <= rd_col;
      for (int k = 1; k < MB; k++) begin
        pv[k] <= pv[k-1]; pr[k] <= pr[k-1]; pc[k] <= pc[k-1];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_LOAD;
      col       <= '0;
      row       <= '0;
      gap       <= '0;
      init_pass <= 1'b0;
      exact_r   <= 1'b0;
      first_rd  <= 1'b0;
      iters     <= '0;
      converged <= 1'b0;
    end else begin
      case (state)
        S_LOAD: if (in_valid) begin
          if (col == CBW'(NB - 1)) begin
            state     <= S_PASS;
            col       <= '0;
            row       <= '0;
            gap       <= '0;
            init_pass <= 1'b1;
            first_rd  <= 1'b1;
            exact_r   <= mode_exact;
            iters     <= '0;
            converged <= 1'b0;
          end else begin
            col <= col + 1'b1;
          end
        end
        S_PASS: begin
          if (gap != '0) begin
            gap <= gap - 1'b1;
          end else begin
            first_rd <= 1'b0;
            if (row == RBW'(MB - 1)) begin
              row <= '0;
              if (col == CBW'(NB - 1)) begin
                state <= S_DRAIN;
                col   <= '0;
              end else begin
                col <= col + 1'b1;
                gap <= exact_r ? (RBW+1)'(MB) : '0;
              end
            end else begin
              row <= row + 1'b1;
            end
          end
        end
        S_DRAIN: if (!pipe_busy) begin
          if (init_pass) begin
            init_pass <= 1'b0;
            first_rd  <= 1'b1;
            state     <= S_PASS;
          end else begin
            iters <= iters + 1'b1;
            if (syn_zero || iters == IW'(IMAX - 1)) begin
              converged <= syn_zero;
              state     <= S_OUT;
            end else begin
              first_rd <= 1'b1;
              state    <= S_PASS;
            end
          end
        end
        S_OUT: if (out_ready) begin
          if (col == CBW'(NB - 1)) begin
            col   <= '0;
            state <= S_LOAD;
          end else begin
            col <= col + 1'b1;
          end
        end
        default: state <= S_LOAD;
      endcase
    end
  end
endmodule
