// pbist_sync2: two-flip-flop synchroniser for a single-bit level signal.
//
// Brings lock, test_ready and good, which come from the PLL and from the
// circuit under test running at f_out, into the board-clock domain of the
// control logic. Output follows the input two clk edges later; reset clears
// both stages. The document does not describe clock-domain crossing; the
// synchroniser is this design's own addition.
module pbist_sync2 (
  input  logic clk,
  input  logic rst,
  input  logic d,
  output logic q
);
  logic meta;

  always_ff @(posedge clk) begin
    if (rst) begin
      meta <= 1'b0;
      q    <= 1'b0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
