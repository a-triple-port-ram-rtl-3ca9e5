// tb_tpram: self-checking testbench of the triple port RAM.
//
// Fills an 8-word RAM, then runs random cycles with random chip select,
// write address, data and two read addresses, and compares both read ports
// every cycle with a reference array kept by the testbench.  Checks that
// cs = 0 leaves the array unchanged and that a read of the location written
// in the same cycle returns the old word.
module tb_tpram;
  localparam int unsigned DEPTH = 8;
  localparam int unsigned W     = 8;
  localparam int unsigned AW    = 3;

  logic          clk = 1'b0;
  logic          cs;
  logic [AW-1:0] wa, ra1, ra2;
  logic [W-1:0]  din, o1, o2;
  logic [W-1:0]  ref_mem [DEPTH];
  int            checks = 0, failures = 0;
  int            cs_off = 0, same_cycle = 0;

  tpram #(.DEPTH(DEPTH), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads();
    #1;
    checks += 2;
    if (o1 !== ref_mem[ra1]) begin
      failures++;
      $display("port 1 mismatch: ra1=%0d got %h exp %h", ra1, o1, ref_mem[ra1]);
    end
    if (o2 !== ref_mem[ra2]) begin
      failures++;
      $display("port 2 mismatch: ra2=%0d got %h exp %h", ra2, o2, ref_mem[ra2]);
    end
  endtask

  initial begin
    // fill every word once
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      cs = 1'b1; wa = AW'(i); din = W'($urandom); ra1 = '0; ra2 = '0;
      @(posedge clk);
      ref_mem[i] = din;
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      cs  = ($urandom % 3) != 0;
      wa  = AW'($urandom);
      din = W'($urandom);
      ra1 = ($urandom % 4 == 0) ? wa : AW'($urandom);
      ra2 = AW'($urandom);
      if (!cs) cs_off++;
      if (cs && ra1 == wa) same_cycle++;
      check_reads();
      @(posedge clk);
      if (cs) ref_mem[wa] = din;
    end
    // all words once more, with cs low: nothing may have changed
    @(negedge clk);
    cs = 1'b0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      ra1 = AW'(i); ra2 = AW'(DEPTH - 1 - i); din = ~din;
      check_reads();
    end
    checks++;
    if (cs_off == 0 || same_cycle == 0) begin
      failures++;
      $display("coverage: cs_off=%0d same_cycle=%0d", cs_off, same_cycle);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
