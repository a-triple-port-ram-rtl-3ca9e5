// tb_tr_outmux: self-checking testbench of the three output multiplexers.
//
// Applies every m (0..3), through the select table, with random words on
// the six sources and checks that O2 shows the input for m = 0 and D
// otherwise, O3 shows A for m = 0, 1 and E otherwise, O4 shows B for
// m = 0, 1, 2 and F for m = 3.
module tb_tr_outmux;
  import tr_pkg::*;
  localparam int unsigned W = 12;

  sel_t         sel;
  logic [W-1:0] din, a, b, d, e, f, o2, o3, o4;
  int           checks = 0, failures = 0;

  tr_outmux #(.W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      logic [1:0] m;
      logic [W-1:0] e2, e3, e4;
      m   = 2'(n % 4);
      sel = sel_of_m(m);
      {din, a, b} = {W'($urandom), W'($urandom), W'($urandom)};
      {d, e, f}   = {W'($urandom), W'($urandom), W'($urandom)};
      e2 = (m == 0) ? din : d;
      e3 = (m <= 1) ? a : e;
      e4 = (m <= 2) ? b : f;
      #1;
      checks += 3;
      if (o2 !== e2 || o3 !== e3 || o4 !== e4) begin
        failures++;
        $display("m=%0d got %h %h %h exp %h %h %h", m, o2, o3, o4, e2, e3, e4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
