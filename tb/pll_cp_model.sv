// pll_cp_model: behavioural model of a charge-pump PLL for simulation only;
// not synthesizable.
//
// Structure: phase/frequency detector -> charge pump -> passive second-order
// loop filter -> VCO. The feedback divider is outside (fb_clk = fout / N).
//  * PFD: a rising edge of ref_clk sets UP, a rising edge of fb_clk sets DN;
//    when both are set both clear. The charge pump drives +I0 while only UP
//    is set and -I0 while only DN is set.
//  * Loop filter: C1 from the control node to ground, in parallel with R in
//    series with C2, so F(s) = (sRC2 + 1) / (sC2 (sRC1 + (C1 + C2)/C2)).
//    Between events the pump current is constant and the two capacitor
//    voltages are advanced with the exact solution of the linear circuit:
//    the total charge grows by I*t, and the difference d = Vf - Vc2 relaxes
//    with tau = R*C1*C2/(C1+C2) towards I*R*C2/(C1+C2).
//  * VCO: f = F_MIN + KVCO * Vf, clamped to [F_MIN, F_MAX]; each half period
//    uses the frequency at its start.
//  * Lock: set after LOCK_COUNT consecutive reference cycles whose UP or DN
//    pulse is shorter than LOCK_TOL; cleared by the first longer pulse.
//
// Default values give a damping of about 2.6 at N = 1, falling as 1/sqrt(N)
// to 0.5 at N = 28 (zeta = R*C2/2 * sqrt(I0*K0 / (2*pi*C2*N)), K0 in rad/s
// per volt), with a natural frequency well below the 3.3 MHz reference.
// Units: ns, V, mA, pF, kOhm (so I/C is V/ns and R*C is ns), MHz.
`timescale 1ns / 1ps
module pll_cp_model #(
  parameter real         I0         = 0.0014,  // mA   (1.4 uA)
  parameter real         C1         = 10.0,    // pF
  parameter real         C2         = 200.0,   // pF
  parameter real         R          = 35.4,    // kOhm (R*C2 = 7.08 us)
  parameter real         KVCO       = 80.0,    // MHz per V
  parameter real         F_MIN      = 1.0,     // MHz
  parameter real         F_MAX      = 200.0,   // MHz
  parameter real         LOCK_TOL   = 1.0,     // ns
  parameter int unsigned LOCK_COUNT = 16
) (
  input  logic ref_clk,
  input  logic fb_clk,
  output logic fout,
  output logic lock
);
  real     vf = 0.0, vc2 = 0.0;
  realtime t_upd = 0.0, t_pulse = 0.0;
  logic    up = 1'b0, dn = 1'b0;
  int      good_cycles = 0;

  // Advance the loop filter to the current time with the present pump current.
  function automatic void advance();
    real dt, i, q, d, tau, d_inf, ctot;
    dt   = $realtime - t_upd;
    t_upd = $realtime;
    if (dt <= 0.0) return;
    i     = (up && !dn) ? I0 : ((dn && !up) ? -I0 : 0.0);
    ctot  = C1 + C2;
    q     = C1 * vf + C2 * vc2 + i * dt;
    tau   = R * C1 * C2 / ctot;
    d_inf = i * R * C2 / ctot;
    d     = d_inf + (vf - vc2 - d_inf) * $exp(-dt / tau);
    vf    = (q + C2 * d) / ctot;
    vc2   = (q - C1 * d) / ctot;
  endfunction

  function automatic real f_vco();
    real f = F_MIN + KVCO * vf;
    if (f < F_MIN) f = F_MIN;
    if (f > F_MAX) f = F_MAX;
    return f;
  endfunction

  initial begin
    fout = 1'b0;
    lock = 1'b0;
    forever begin
      advance();
      #(500.0 / f_vco()) fout = ~fout;
    end
  end

  // Phase/frequency detector with lock detection on the pulse width.
  task automatic pfd_edge(input bit is_ref);
    advance();
    if (!up && !dn) t_pulse = $realtime;
    if (is_ref) up = 1'b1;
    else        dn = 1'b1;
    if (up && dn) begin
      up = 1'b0;
      dn = 1'b0;
      if ($realtime - t_pulse < LOCK_TOL) begin
        if (good_cycles < LOCK_COUNT) good_cycles++;
      end else begin
        good_cycles = 0;
      end
    end else if ($realtime - t_pulse >= LOCK_TOL) begin
      good_cycles = 0;
    end
    lock = (good_cycles >= LOCK_COUNT);
  endtask

  always @(posedge ref_clk) pfd_edge(1'b1);
  always @(posedge fb_clk)  pfd_edge(1'b0);
endmodule
