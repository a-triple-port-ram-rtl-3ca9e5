// tb_tr_stream: stimulus and checker for one TR commutator of a given size,
// used by tb_tr_workloads.
//
// After reset it streams FRAMES frames of 4N random words of W bits into its
// own commutator and checks, in every slot of every output frame, that
// O1..O4 are the words x(N*p + q), p = m, m-1, m-2, m-3 (mod 4), of that
// frame and that out_valid rose 3N clocks after the first word.  It raises
// done when finished and reports its check and failure counts.
module tb_tr_stream #(
  parameter int unsigned N      = 4,
  parameter int unsigned W      = 8,
  parameter int unsigned FRAMES = 6
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned CYCLES = FRAMES * 4 * N;
  localparam int unsigned QW     = (N <= 2) ? 1 : $clog2(N);

  logic          rst_n = 1'b0;
  logic [W-1:0]  din, o1, o2, o3, o4;
  logic [1:0]    m;
  logic [QW-1:0] q;
  logic          out_valid;
  logic [W-1:0]  hist [CYCLES];

  tr_commutator #(.N(N), .W(W)) dut (.*);

  initial begin
    int first_valid;
    done = 1'b0; checks = 0; failures = 0; first_valid = -1;
    repeat (2) @(posedge clk);
    for (int t = 0; t < CYCLES; t++) begin
      @(negedge clk);
      rst_n = 1'b1;
      din = W'($urandom);
      hist[t] = din;
      #1;
      if (out_valid && first_valid < 0) first_valid = t;
      if (t >= 3 * N) begin
        int s, f0, em, eq;
        s  = (t - 3 * N) % (4 * N);
        f0 = t - 3 * N - s;
        em = s / N;
        eq = s % N;
        checks++;
        if (m != 2'(em) || q != QW'(eq) ||
            o1 !== hist[f0 + N * em + eq] ||
            o2 !== hist[f0 + N * ((em + 3) % 4) + eq] ||
            o3 !== hist[f0 + N * ((em + 2) % 4) + eq] ||
            o4 !== hist[f0 + N * ((em + 1) % 4) + eq]) begin
          failures++;
          if (failures < 10) $display("N=%0d W=%0d t=%0d: wrong outputs", N, W, t);
        end
      end
      @(posedge clk);
    end
    checks++;
    if (first_valid != 3 * N) begin
      failures++;
      $display("N=%0d W=%0d: out_valid at %0d, exp %0d", N, W, first_valid, 3 * N);
    end
    done = 1'b1;
  end
endmodule
