// tb_tr_workloads: the commutator configurations the architecture is
// evaluated in, plus the worked 16-point example.
//
// Part 1, the 16-point example (N = 4, 8-word RAMs): the input words are
// numbered 0..15 within each frame and fed with their numbers as data.  In
// every slot of an output frame the testbench compares O1..O4 and the six
// RAM port values A..F with the word numbers of the example's timing
// diagrams, listed below slot by slot; a port shown as "don't care" there
// (-1 below) is not compared.
//
// Part 2, the first and second stage commutators of a 64-point radix-4 FFT
// (N = 16 and N = 4) at the data widths 8, 10, 12, 14 and 16 bits, each
// with random data over several frames through tb_tr_stream.
//
// Part 3, a last-stage commutator (N = 1, 2-word RAMs), the kind of stage
// of a longer FFT the architecture also suits, with 16-bit random data.
module tb_tr_workloads;
  localparam int unsigned N = 4;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- part 1: the 16-point example ----------------------------------
  // word numbers per output slot s = 4m + q, from the timing diagrams
  localparam int EXP_O [4][16] = '{
    '{ 0, 1, 2, 3,  4, 5, 6, 7,  8, 9,10,11, 12,13,14,15},   // O1
    '{12,13,14,15,  0, 1, 2, 3,  4, 5, 6, 7,  8, 9,10,11},   // O2
    '{ 8, 9,10,11, 12,13,14,15,  0, 1, 2, 3,  4, 5, 6, 7},   // O3
    '{ 4, 5, 6, 7,  8, 9,10,11, 12,13,14,15,  0, 1, 2, 3}    // O4
  };
  localparam int EXP_P [6][16] = '{
    '{ 8, 9,10,11, 12,13,14,15, -1,-1,-1,-1, -1,-1,-1,-1},   // A
    '{ 4, 5, 6, 7,  8, 9,10,11, 12,13,14,15,  0, 1, 2, 3},   // B
    '{ 0, 1, 2, 3,  4, 5, 6, 7,  8, 9,10,11, 12,13,14,15},   // C
    '{-1,-1,-1,-1,  0, 1, 2, 3,  4, 5, 6, 7,  8, 9,10,11},   // D
    '{-1,-1,-1,-1, -1,-1,-1,-1,  0, 1, 2, 3,  4, 5, 6, 7},   // E
    '{-1,-1,-1,-1, -1,-1,-1,-1, -1,-1,-1,-1,  0, 1, 2, 3}    // F
  };

  logic       rst_n = 1'b0;
  logic [7:0] din, o1, o2, o3, o4;
  logic [1:0] m;
  logic [1:0] q;
  logic       out_valid;
  bit         ex_done = 1'b0;

  tr_commutator #(.N(N), .W(8)) u_ex (.*);

  initial begin
    repeat (2) @(posedge clk);
    for (int t = 0; t < 6 * 4 * N; t++) begin
      @(negedge clk);
      rst_n = 1'b1;
      din = 8'(t % 16);
      #1;
      if (t >= 3 * N) begin
        int s;
        logic [7:0] got_o [4];
        logic [7:0] got_p [6];
        s = (t - 3 * N) % 16;
        got_o = '{o1, o2, o3, o4};
        got_p = '{u_ex.a, u_ex.b, u_ex.c, u_ex.d, u_ex.e, u_ex.f};
        for (int k = 0; k < 4; k++) begin
          checks++;
          if (got_o[k] != 8'(EXP_O[k][s])) begin
            failures++;
            $display("example slot %0d: O%0d = %0d, exp %0d", s, k + 1, got_o[k], EXP_O[k][s]);
          end
        end
        for (int k = 0; k < 6; k++) begin
          if (EXP_P[k][s] >= 0) begin
            checks++;
            if (got_p[k] != 8'(EXP_P[k][s])) begin
              failures++;
              $display("example slot %0d: port %0d = %0d, exp %0d", s, k, got_p[k], EXP_P[k][s]);
            end
          end
        end
      end
      @(posedge clk);
    end
    ex_done = 1'b1;
  end

  // ---- part 2: 64-point FFT stage 1 (N = 16) and stage 2 (N = 4) -------
  localparam int unsigned NW = 5;
  localparam int unsigned WIDTHS [NW] = '{8, 10, 12, 14, 16};

  logic done1 [NW], done2 [NW];
  int   ck1 [NW], fl1 [NW], ck2 [NW], fl2 [NW];

  for (genvar i = 0; i < NW; i++) begin : g_w
    tb_tr_stream #(.N(16), .W(WIDTHS[i]), .FRAMES(5)) u_st1 (
      .clk, .done(done1[i]), .checks(ck1[i]), .failures(fl1[i]));
    tb_tr_stream #(.N(4), .W(WIDTHS[i]), .FRAMES(8)) u_st2 (
      .clk, .done(done2[i]), .checks(ck2[i]), .failures(fl2[i]));
  end

  logic done3;
  int   ck3, fl3;
  tb_tr_stream #(.N(1), .W(16), .FRAMES(12)) u_st3 (
    .clk, .done(done3), .checks(ck3), .failures(fl3));

  initial begin
    bit all_done;
    all_done = 1'b0;
    while (!all_done) begin
      @(posedge clk);
      all_done = ex_done & done3;
      for (int i = 0; i < NW; i++) all_done &= done1[i] & done2[i];
    end
    for (int i = 0; i < NW; i++) begin
      $display("64-point stage 1, %0d bits: %0d checks, %0d failures", WIDTHS[i], ck1[i], fl1[i]);
      $display("64-point stage 2, %0d bits: %0d checks, %0d failures", WIDTHS[i], ck2[i], fl2[i]);
      checks += ck1[i] + ck2[i];
      failures += fl1[i] + fl2[i];
    end
    $display("last stage, N = 1, 16 bits: %0d checks, %0d failures", ck3, fl3);
    checks += ck3;
    failures += fl3;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
