// offset_generator: edge offsets programmed by the external processor.
//
// The processor corrects errors of the circuit and its surroundings by
// moving the edges of the TDD output in 1 us steps. It programs a trim
// for both edges and an extra trim for each; this block adds them and
// limits each sum to +/-TRIM_MAX so that the signal generator can always
// apply it. Outputs are registered and change one clock after the inputs.
// The document gives the block's task; the two trims and the limit are
// this design's choices.
module offset_generator
  import tdd_pkg::*;
#(
  parameter int unsigned TRIM_MAX = 15
) (
  input  logic  clk,
  input  logic  rst_n,
  input  trim_t trim_all,
  input  trim_t trim_rise,
  input  trim_t trim_fall,
  output trim_t rise_off,   // added to the DL start position
  output trim_t fall_off    // added to the DL end position
);
  function automatic trim_t clamp(int v);
    if (v >  int'(TRIM_MAX)) return trim_t'(TRIM_MAX);
    if (v < -int'(TRIM_MAX)) return -trim_t'(TRIM_MAX);
    return trim_t'(v);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rise_off <= '0;
      fall_off <= '0;
    end else begin
      rise_off <= clamp(int'(trim_all) + int'(trim_rise));
      fall_off <= clamp(int'(trim_all) + int'(trim_fall));
    end
  end
endmodule
