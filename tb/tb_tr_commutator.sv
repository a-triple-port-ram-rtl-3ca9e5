// tb_tr_commutator: end-to-end testbench of the TR commutator at its default
// size (N = 16, the first stage of a 64-point radix-4 FFT; 16-bit words).
//
// Streams random words, without gaps, through the commutator for many
// frames of 4N words and keeps every word it sent.  In every slot from
// out_valid on it computes which frame and slot the outputs belong to and
// checks that O1..O4 carry x(N*p + q) for p = m, m-1, m-2, m-3 (mod 4), as
// the radix-4 summation of that slot needs, and that m and q are right.
// The latency is checked too: out_valid must rise exactly 3N clocks after
// the first word.
//
// It also checks and counts the power-saving mechanisms:
//   - every m phase and both positions of each select line occur;
//   - TM2's chip select is low (no write) while m = 0 and m = 3;
//   - port E never switches while it is idle (m = 0, 1);
//   - ports A and F switch at most once per idle period, where a port whose
//     read address followed the write pointer would switch every slot.
module tb_tr_commutator;
  localparam int unsigned N      = 16;
  localparam int unsigned W      = 16;
  localparam int unsigned FRAMES = 24;
  localparam int unsigned CYCLES = FRAMES * 4 * N;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] din, o1, o2, o3, o4;
  logic [1:0]   m;
  logic [3:0]   q;
  logic         out_valid;

  int checks = 0, failures = 0;
  logic [W-1:0] hist [CYCLES];

  // mechanism counters
  int m_seen [4];
  int c_one [3], c_zero [3];
  int tm2_write_off = 0, e_held = 0, a_idle_switch = 0, f_idle_switch = 0;
  int idle_periods = 0, first_valid = -1;

  tr_commutator dut (.*);

  always #5 clk = ~clk;

  initial begin
    #((CYCLES + 100) * 10);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void fail(input string msg);
    failures++;
    if (failures < 20) $display("%s", msg);
  endfunction

  initial begin
    logic [W-1:0] prev_a, prev_e, prev_f;
    int a_sw, f_sw;
    a_sw = 0; f_sw = 0;
    prev_a = '0; prev_e = '0; prev_f = '0;
    repeat (3) @(posedge clk);
    for (int t = 0; t < CYCLES; t++) begin
      @(negedge clk);
      rst_n = 1'b1;
      din = W'($urandom);
      hist[t] = din;
      #1;
      if (out_valid && first_valid < 0) first_valid = t;
      if (t >= 3 * N) begin
        int s, f0, em, eq;
        logic [W-1:0] e [4];
        s  = (t - 3 * N) % (4 * N);
        f0 = t - 3 * N - s;
        em = s / N;
        eq = s % N;
        for (int k = 0; k < 4; k++) e[k] = hist[f0 + N * ((em - k + 4) % 4) + eq];
        checks++;
        if (!out_valid || m != 2'(em) || q != 4'(eq))
          fail($sformatf("t=%0d: valid=%0b m=%0d q=%0d, exp m=%0d q=%0d", t, out_valid, m, q, em, eq));
        checks++;
        if (o1 !== e[0] || o2 !== e[1] || o3 !== e[2] || o4 !== e[3])
          fail($sformatf("t=%0d m=%0d q=%0d: O=%h %h %h %h exp %h %h %h %h",
                         t, em, eq, o1, o2, o3, o4, e[0], e[1], e[2], e[3]));
        // mechanisms
        m_seen[em]++;
        if (dut.sel.c1) c_one[0]++; else c_zero[0]++;
        if (dut.sel.c2) c_one[1]++; else c_zero[1]++;
        if (dut.sel.c3) c_one[2]++; else c_zero[2]++;
        checks++;
        if (dut.cs != (em == 1 || em == 2)) fail($sformatf("t=%0d: TM2 cs=%0b in m=%0d", t, dut.cs, em));
        if (!dut.cs) tm2_write_off++;
        // idle-port switching, from the second output frame on
        if (t >= 3 * N + 4 * N) begin
          if (em <= 1 && eq + em * N > 0) begin
            checks++;
            if (dut.e !== prev_e) fail($sformatf("t=%0d: idle port E switched", t));
            else e_held++;
          end
          if (em >= 2 && dut.a !== prev_a) a_sw++;
          if (em <= 2 && dut.f !== prev_f) f_sw++;
          if (s == 4 * N - 1) begin
            // end of an output frame: one idle period of A and of F is over
            checks += 2;
            if (a_sw > 1) fail($sformatf("t=%0d: idle port A switched %0d times", t, a_sw));
            if (f_sw > 1) fail($sformatf("t=%0d: idle port F switched %0d times", t, f_sw));
            a_idle_switch += a_sw; f_idle_switch += f_sw;
            a_sw = 0; f_sw = 0;
            idle_periods++;
          end
        end
      end else begin
        checks++;
        if (out_valid) fail($sformatf("t=%0d: out_valid before the first output frame", t));
      end
      prev_a = dut.a; prev_e = dut.e; prev_f = dut.f;
      @(posedge clk);
    end

    checks++;
    if (first_valid != 3 * N) fail($sformatf("latency: out_valid at %0d, exp %0d", first_valid, 3 * N));
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (m_seen[k] == 0) fail($sformatf("m=%0d never occurred", k));
    end
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (c_one[k] == 0 || c_zero[k] == 0) fail($sformatf("select c%0d did not take both values", k + 1));
    end
    checks++;
    if (tm2_write_off == 0 || e_held == 0 || idle_periods == 0) fail("a power-saving mechanism never occurred");
    $display("slots per m: %0d %0d %0d %0d; TM2 write-off slots %0d; E held %0d slots",
             m_seen[0], m_seen[1], m_seen[2], m_seen[3], tm2_write_off, e_held);
    $display("idle periods %0d: A switched %0d times in %0d idle slots, F %0d times in %0d idle slots",
             idle_periods, a_idle_switch, idle_periods * 2 * N, f_idle_switch, idle_periods * 3 * N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
