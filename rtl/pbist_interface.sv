// pbist_interface: interface logic with the output register.
//
// The output register receives N whenever the test FSM pulses store (a BIST
// run at that N has passed), so at the end of a search it holds the highest
// passing N; the maximum CUT frequency is that value times f_in/M. clear
// (from the control FSM, at the start of a search) sets it to zero, which
// therefore means "no frequency passed". The register is read serially: while
// read_out is low a shift copy follows the output register; while read_out is
// high the copy shifts left once per clk cycle and data_out shows its most
// significant bit, so the W result bits appear MSB first on data_out in the
// first W cycles of read_out. The document names the output register, the
// read_out and data_out pins; the serial protocol and the clear are this
// design's choices.
module pbist_interface #(
  parameter int unsigned W = pbist_pkg::DIV_W
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         clear,
  input  logic         store,
  input  logic [W-1:0] n_in,
  input  logic         read_out,
  output logic [W-1:0] result,
  output logic         data_out
);
  logic [W-1:0] shreg;

  always_ff @(posedge clk) begin
    if (rst)        result <= '0;
    else if (clear) result <= '0;
    else if (store) result <= n_in;
  end

  always_ff @(posedge clk) begin
    if (rst)           shreg <= '0;
    else if (read_out) shreg <= {shreg[W-2:0], 1'b0};
    else               shreg <= result;
  end

  assign data_out = shreg[W-1];
endmodule
