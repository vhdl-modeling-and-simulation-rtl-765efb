// Register with load enable and complementary outputs.
//
// On a rising clock edge the register takes D while LD is high and keeps its
// value while LD is low; Q and Q_N are the stored word and its complement.
// This is the document's 5-bit register cell (W defaults to 5); the DIS uses
// it, at other widths, for the preload and active coefficient registers of
// each range bin processor. The asynchronous active-low reset that clears it
// is this design's addition so that simulation starts from a known state.
module load_reg #(
  parameter int unsigned W = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ld,
  input  logic [W-1:0] d,
  output logic [W-1:0] q,
  output logic [W-1:0] q_n
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (ld) q <= d;
  end

  assign q_n = ~q;
endmodule
