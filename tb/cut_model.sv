// cut_model: behavioural model of a self-testable circuit under test, for
// simulation only; not synthesizable.
//
// When test_on rises the model runs PATTERNS clock cycles of its own BIST on
// clk (the PLL output f_out): a 16-bit LFSR (x^16+x^14+x^13+x^11+1) drives a
// small logic function whose result reaches the capture register only
// PATH_DELAY ns after the LFSR changes (a programmable signal path length);
// a 16-bit MISR compacts the captured values. When the clock period is
// shorter than PATH_DELAY the capture register sees a stale value and the
// signature goes wrong. Optionally, clock periods inside [ISLAND_LO,
// ISLAND_HI] ns take a fast path that always captures the right value,
// which models a pass "island" above the first fail region. After the last
// pattern the model compares the MISR with the golden signature (computed at
// time zero without delay), sets good and raises test_ready, and holds both
// until test_on drops (four-phase handshake).
`timescale 1ns / 1ps
module cut_model #(
  parameter int unsigned PATTERNS   = 64,
  parameter real         PATH_DELAY = 10.0,
  parameter real         ISLAND_LO  = 0.0,
  parameter real         ISLAND_HI  = 0.0
) (
  input  logic clk,
  input  logic test_on,
  output logic test_ready,
  output logic good
);
  localparam logic [15:0] SEED = 16'hACE1;

  logic [15:0] lfsr = SEED;
  logic [15:0] misr = '0;
  logic [15:0] comb_slow = '0;
  logic [15:0] golden;
  realtime     t_last = 0.0, period = 0.0;
  int          runs = 0;

  function automatic logic [15:0] lfsr_next(logic [15:0] s);
    return {s[14:0], s[15] ^ s[13] ^ s[12] ^ s[10]};
  endfunction
  function automatic logic [15:0] logic_fn(logic [15:0] s);
    return (s + {s[7:0], s[15:8]}) ^ {s[0], s[15:1]};
  endfunction
  function automatic logic [15:0] misr_next(logic [15:0] m, logic [15:0] d);
    return {m[14:0], m[15] ^ m[13] ^ m[12] ^ m[10]} ^ d;
  endfunction

  initial begin
    logic [15:0] s, m;
    s = SEED;
    m = '0;
    for (int i = 0; i < PATTERNS; i++) begin
      m = misr_next(m, logic_fn(s));
      s = lfsr_next(s);
    end
    golden     = m;
    comb_slow  = logic_fn(SEED);
    test_ready = 1'b0;
    good       = 1'b0;
  end

  // Transport delay of the long signal path.
  always @(lfsr) comb_slow <= #(PATH_DELAY) logic_fn(lfsr);

  always @(posedge clk) begin
    period = $realtime - t_last;
    t_last = $realtime;
  end

  initial begin
    forever begin
      @(posedge clk iff test_on);
      runs++;
      lfsr = SEED;
      misr = '0;
      #(PATH_DELAY + 1.0);
      for (int i = 0; i < PATTERNS; i++) begin
        @(posedge clk);
        if (period >= ISLAND_LO && period <= ISLAND_HI)
          misr = misr_next(misr, logic_fn(lfsr));
        else
          misr = misr_next(misr, comb_slow);
        lfsr = lfsr_next(lfsr);
      end
      @(posedge clk);
      good       = (misr == golden);
      test_ready = 1'b1;
      do @(posedge clk); while (test_on);
      test_ready = 1'b0;
      good       = 1'b0;
    end
  end
endmodule
