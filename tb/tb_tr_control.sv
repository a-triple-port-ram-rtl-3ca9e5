// tb_tr_control: self-checking testbench of the CONTROL block (FSM + ROM).
//
// Runs the block for N = 4 over several frames after reset and checks every
// cycle: the FSM addresses against the cycle number (a1 = slot mod 2N,
// a2 = a1 + 1, a3 = a1 - N), the chip select and selects against m, and the
// ROM addresses against their roles: aa equals a3 while m = 0, 1 and ae
// equals a3 while m = 2, 3 (all three read the word written N slots ago),
// af equals a2 from the last slot of m = 2 to the one before the last of
// m = 3, and each of them stays at its last used value while idle.
module tb_tr_control;
  import tr_pkg::*;
  localparam int unsigned N  = 4;
  localparam int unsigned AW = 3;
  localparam int unsigned QW = 2;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic [AW-1:0] a1, a2, a3, aa, ae, af;
  logic          cs, out_valid;
  logic [1:0]    m;
  logic [QW-1:0] q;
  sel_t          sel;
  int            checks = 0, failures = 0;

  tr_control #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [AW-1:0] pa, pe, pf;
    pa = '0; pe = '0; pf = '0;
    repeat (2) @(posedge clk);
    for (int t = 0; t < 10 * 4 * N; t++) begin
      int s, em;
      bit uf;
      @(negedge clk);
      rst_n = 1'b1;
      #1;
      s  = (t + N) % (4 * N);
      em = s / N;
      uf = (s >= 3 * N - 1 && s <= 4 * N - 2);
      checks++;
      if (a1 != AW'(s % (2 * N)) || a2 != a1 + AW'(1) || a3 != a1 - AW'(N) ||
          m != 2'(em) || q != QW'(s % N) || cs != (em == 1 || em == 2) ||
          sel != sel_of_m(2'(em))) begin
        failures++;
        $display("t=%0d FSM outputs wrong", t);
      end
      // ROM addresses, after one full frame so that the idle values are known
      if (t >= 4 * N) begin
        checks += 3;
        if (em <= 1 ? aa != a3 : aa != pa) begin failures++; $display("t=%0d aa=%0d", t, aa); end
        if (em >= 2 ? ae != a3 : ae != pe) begin failures++; $display("t=%0d ae=%0d", t, ae); end
        if (uf ? af != a2 : af != pf)      begin failures++; $display("t=%0d af=%0d", t, af); end
      end
      pa = aa; pe = ae; pf = af;
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
