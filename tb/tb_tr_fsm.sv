// tb_tr_fsm: self-checking testbench of the CONTROL block's FSM.
//
// Runs the FSM for N = 4 (the 16-point example, 8-word RAMs) over several
// frames after reset and compares every output each cycle with values
// computed from the cycle number: slot s = (t + N) mod 4N, a1 = s mod 2N,
// a2 = a1 + 1, a3 = a1 - N, m = s / N, q = s mod N, cs high for m = 1, 2,
// selects from the printed table, and out_valid rising exactly 3N cycles
// after the first word.  A second reset in the middle must restart it.
module tb_tr_fsm;
  import tr_pkg::*;
  localparam int unsigned N  = 4;
  localparam int unsigned AW = 3;
  localparam int unsigned CW = 4;
  localparam int unsigned QW = 2;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic [CW-1:0] cnt;
  logic [AW-1:0] a1, a2, a3;
  logic          cs, out_valid;
  logic [1:0]    m;
  logic [QW-1:0] q;
  sel_t          sel;
  int            checks = 0, failures = 0;

  tr_fsm #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int cycles);
    for (int t = 0; t < cycles; t++) begin
      int s, ea1, em;
      sel_t es;
      @(negedge clk);
      rst_n = 1'b1;
      #1;
      s   = (t + N) % (4 * N);
      ea1 = s % (2 * N);
      em  = s / N;
      es  = '{c1: (em == 0), c2: (em <= 1), c3: (em <= 2)};
      checks++;
      if (a1 != AW'(ea1) || a2 != AW'((ea1 + 1) % (2 * N)) ||
          a3 != AW'((ea1 + N) % (2 * N)) || m != 2'(em) || q != QW'(s % N) ||
          cs != (em == 1 || em == 2) || sel != es || out_valid != (t >= 3 * N)) begin
        failures++;
        $display("t=%0d: a1=%0d a2=%0d a3=%0d m=%0d q=%0d cs=%0b sel=%b v=%0b (exp a1=%0d m=%0d)",
                 t, a1, a2, a3, m, q, cs, sel, out_valid, ea1, em);
      end
      @(posedge clk);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    run(7 * 4 * N + 3);
    @(negedge clk); rst_n = 1'b0;
    @(posedge clk);
    run(3 * 4 * N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
