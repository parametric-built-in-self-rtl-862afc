// pbist_initial: initialisation logic holding Register M and Register N.
//
// While init is high the two registers form one 2*W-bit scan chain that
// shifts in one bit of scan_in per clk cycle, M first and most significant
// bit first, so the chain reads {M, N} after 2*W shifts. The cycle after the
// last shift init_ok goes high and stays high until init drops. Outside
// initialisation, Register N is the search counter of the test: n_inc adds
// one and n_dec subtracts one (n_inc wins if both are set). The document
// names the two registers, the scan_in pin and the init/init_ok and
// N_inc/N_dec signals; the serial bit order, the shift count handshake and
// the reset values (M_DEF and 1) are this design's own choices.
//
// Timing: the first bit is sampled on the clk edge that ends the first cycle
// with init high.
module pbist_initial #(
  parameter int unsigned W = pbist_pkg::DIV_W
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         init,
  input  logic         scan_in,
  input  logic         n_inc,
  input  logic         n_dec,
  output logic         init_ok,
  output logic [W-1:0] m_q,
  output logic [W-1:0] n_q
);
  localparam int unsigned CHAIN = 2 * W;
  localparam int unsigned CW    = $clog2(CHAIN + 1);

  logic [CW-1:0] shifts;

  always_ff @(posedge clk) begin
    if (rst) begin
      m_q     <= W'(pbist_pkg::M_DEF);
      n_q     <= W'(1);
      shifts  <= '0;
      init_ok <= 1'b0;
    end else if (init) begin
      if (shifts != CW'(CHAIN)) begin
        {m_q, n_q} <= {m_q[W-2:0], n_q, scan_in};
        shifts     <= shifts + CW'(1);
      end else begin
        init_ok <= 1'b1;
      end
    end else begin
      shifts  <= '0;
      init_ok <= 1'b0;
      if (n_inc)      n_q <= n_q + W'(1);
      else if (n_dec) n_q <= n_q - W'(1);
    end
  end
endmodule
