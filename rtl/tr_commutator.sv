// tr_commutator: triple-port-RAM based (TR) commutator for one stage of a
// radix-4 pipelined FFT.
//
// A radix-4 stage with word separation N receives its data serially, one
// word per clock, in frames of 4N words, and in every slot s = N*m + q of a
// frame it needs the four words x(N*p + q), p = 0..3, of that frame at once.
// The classic commutator gets them from six N-word delay lines; this one
// uses three 2N-word triple port RAMs (TM0, TM1, TM2), each with one write
// port and two read ports, plus one register behind one read port of each:
//
//   TM0  written with the input;   port 2 (a2) + register -> B = input delayed 2N
//                                  port 1 (aa)            -> A = input delayed N
//   TM1  written with B;           port 1 (a3)            -> C = input delayed 3N = O1
//                                  port 2 (a2) + register -> D = input delayed 4N
//   TM2  written with D (cs);      port 1 (ae)            -> E = input delayed 5N
//                                  port 2 (af) + register -> F = input delayed 6N
//
//   O1 = C                     x(N*m + q)
//   O2 = m = 0    ? input : D  x(N*((m-1) mod 4) + q)
//   O3 = m <= 1   ? A : E      x(N*((m-2) mod 4) + q)
//   O4 = m <= 2   ? B : F      x(N*((m-3) mod 4) + q)
//
// Each RAM is a circular buffer written at a1 = slot mod 2N.  Only four of
// the six ports A..F are needed in any slot; the ports A, E and F are
// addressed by a ROM that parks them on an unchanging location while they
// are not needed, and TM2 is written only while m = 1 or 2, the only words
// of it that are ever read.  Both measures cut switching activity, which is
// the point of the architecture.
//
// Interface: one input word din per clock.  The first word after reset
// (rst_n low for at least one clock, synchronous) is word 0 of a frame; the
// stream must then continue without gaps.  o1..o4, m and q describe the
// current output slot; the first output frame starts 3N clocks after the
// first input word, when out_valid rises (the latency of O1, and of the
// classic six-FIFO commutator).  O2 while m = 0 is the input word itself,
// a combinational path.  N must be a power of two (the addresses wrap
// modulo 2N).
//
// The RAM arrangement, the roles of a1, a2, a3, aa, ae, af and cs, and the
// multiplexer sources follow the TR commutator description; the timing
// diagram's sequences fix the delays above.  The asynchronous-read RAM,
// the reset, the exact ROM contents and out_valid are this design's
// choices.  Data registers are not reset: out_valid marks the first slot
// whose four words all come from words written after reset.
module tr_commutator
  import tr_pkg::*;
#(
  parameter int unsigned N = 16,  // word separation N_t of the stage
  parameter int unsigned W = 16,  // data word width
  localparam int unsigned AW = idx_w(2*N),
  localparam int unsigned QW = idx_w(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [W-1:0]  din,
  output logic [W-1:0]  o1,
  output logic [W-1:0]  o2,
  output logic [W-1:0]  o3,
  output logic [W-1:0]  o4,
  output logic [1:0]    m,
  output logic [QW-1:0] q,
  output logic          out_valid
);

  if ((N & (N - 1)) != 0 || N == 0) begin : g_bad_n
    $error("tr_commutator: N must be a power of two");
  end

  logic [AW-1:0] a1, a2, a3, aa, ae, af;
  logic          cs;
  sel_t          sel;

  // RAM port outputs and the registers behind the FIFO ports.
  logic [W-1:0] a, c, e;
  logic [W-1:0] tm0_o2, tm1_o2, tm2_o2;
  logic [W-1:0] b, d, f;

  tr_control #(.N(N)) u_control (
    .clk, .rst_n, .a1, .a2, .a3, .cs, .aa, .ae, .af, .m, .q, .sel, .out_valid
  );

  tpram #(.DEPTH(2*N), .W(W)) u_tm0 (
    .clk, .cs(1'b1), .wa(a1), .din(din), .ra1(aa), .ra2(a2), .o1(a), .o2(tm0_o2)
  );

  tpram #(.DEPTH(2*N), .W(W)) u_tm1 (
    .clk, .cs(1'b1), .wa(a1), .din(b), .ra1(a3), .ra2(a2), .o1(c), .o2(tm1_o2)
  );

  tpram #(.DEPTH(2*N), .W(W)) u_tm2 (
    .clk, .cs(cs), .wa(a1), .din(d), .ra1(ae), .ra2(af), .o1(e), .o2(tm2_o2)
  );

  // The register R behind port 2 of each RAM.
  always_ff @(posedge clk) begin
    b <= tm0_o2;
    d <= tm1_o2;
    f <= tm2_o2;
  end

  assign o1 = c;

  tr_outmux #(.W(W)) u_outmux (
    .sel, .din, .a, .b, .d, .e, .f, .o2, .o3, .o4
  );

endmodule
