// tb_tr_rom: self-checking testbench of the CONTROL block's address ROM.
//
// At the default N = 16 it reads all 4N entries and compares them with an
// address sequence built independently, by walking two frames slot by slot:
// while a port is in use its expected address tracks the data
// (A and E: a1 - N; F: a1 + 1, one slot ahead of its m = 3 phase), and
// while it is idle the expected address is the last one used.
module tb_tr_rom;
  localparam int unsigned N  = 16;
  localparam int unsigned AW = 5;
  localparam int unsigned CW = 6;

  logic [CW-1:0] cnt;
  logic [AW-1:0] aa, ae, af;
  int            checks = 0, failures = 0;

  tr_rom #(.N(N)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last_a, last_e, last_f;
    int used_a, used_e, used_f;
    last_a = 0; last_e = 0; last_f = 0;
    used_a = 0; used_e = 0; used_f = 0;
    for (int k = 0; k < 8 * N; k++) begin
      int c, m, a1;
      bit ua, ue, uf;
      c  = k % (4 * N);
      m  = c / N;
      a1 = c % (2 * N);
      ua = (m == 0 || m == 1);
      ue = (m == 2 || m == 3);
      uf = (c >= 3 * N - 1 && c <= 4 * N - 2);
      if (ua) last_a = (a1 + 2 * N - N) % (2 * N);
      if (ue) last_e = (a1 + 2 * N - N) % (2 * N);
      if (uf) last_f = (a1 + 1) % (2 * N);
      if (k >= 4 * N) begin
        cnt = CW'(c);
        #1;
        checks += 3;
        if (aa != AW'(last_a)) begin failures++; $display("c=%0d aa=%0d exp %0d", c, aa, last_a); end
        if (ae != AW'(last_e)) begin failures++; $display("c=%0d ae=%0d exp %0d", c, ae, last_e); end
        if (af != AW'(last_f)) begin failures++; $display("c=%0d af=%0d exp %0d", c, af, last_f); end
        used_a += int'(ua); used_e += int'(ue); used_f += int'(uf);
      end
    end
    checks++;
    if (used_a != 2 * N || used_e != 2 * N || used_f != N) begin
      failures++;
      $display("phase lengths wrong: %0d %0d %0d", used_a, used_e, used_f);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
