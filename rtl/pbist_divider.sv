// pbist_divider: programmable integer clock divider, used both as the
// reference divider M (f_in -> f_in/M) and as the PLL feedback divider N
// (f_out -> f_out/N).
//
// As the document asks of the N divider, it is a synchronous down counter
// with a parallel preset: when the count reaches zero the counter is loaded
// with div-1 from the preset bus, so a new factor takes effect at the next
// period boundary without disturbing the current period. The output is
// registered: it is high for ceil(div/2) input cycles starting with the
// reload, low for the remaining floor(div/2) cycles, so one rising edge
// appears every div input cycles. Factors 1 and 0 bypass the counter and pass
// the input clock through (0 is treated as 1); the duty cycle, the treatment
// of 1 and 0 and the synchronous reset are this design's choices.
//
// Interface: clk_in is the clock to divide, rst a synchronous reset in that
// clock's domain, div the factor (quasi-static, changed only while the PLL is
// re-locking), clk_out the divided clock.
module pbist_divider #(
  parameter int unsigned W = pbist_pkg::DIV_W
) (
  input  logic         clk_in,
  input  logic         rst,
  input  logic [W-1:0] div,
  output logic         clk_out
);
  logic [W-1:0] cnt;
  logic [W-1:0] cnt_next;
  logic         div_q;
  logic         bypass;

  assign bypass = (div <= W'(1));

  always_comb begin
    if (cnt == '0) cnt_next = div - W'(1);   // parallel preset
    else           cnt_next = cnt - W'(1);
  end

  always_ff @(posedge clk_in) begin
    if (rst) begin
      cnt   <= '0;
      div_q <= 1'b0;
    end else begin
      cnt   <= cnt_next;
      div_q <= (cnt_next >= (div >> 1));
    end
  end

  assign clk_out = bypass ? clk_in : div_q;
endmodule
