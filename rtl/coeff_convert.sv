// Coefficient to 8-bit output code.
//
// The microcontroller reads each coefficient as one byte k and displays
// k * 2^-7, so a code is an unsigned Q1.7 number covering 0 .. 1.9921875.
// This block rounds the fixed-point coefficient to the nearest 1/128 and
// saturates it to 0 .. 255; `sat` flags a clipped value. The code scale
// follows the tool's display arithmetic; rounding and saturation are this
// design's choice. Purely combinational.
module coeff_convert
  import sysid_pkg::*;
(
  input  fix_t       theta,
  output logic [7:0] code,
  output logic       sat
);

  localparam int unsigned SH = FIX_F - 7;

  localparam fix_t HALF  = fix_t'(1) <<< (SH - 1);
  localparam fix_t LIMIT = (fix_t'(255) <<< SH) + HALF;   // rounds to 256

  fix_t rounded;

  always_comb begin
    // add half an LSB of the output code, then drop the extra fraction bits
    rounded = (theta + HALF) >>> SH;
    if (theta < 0) begin
      code = 8'd0;
      sat  = 1'b1;
    end else if (theta >= LIMIT) begin
      code = 8'd255;
      sat  = 1'b1;
    end else begin
      code = rounded[7:0];
      sat  = 1'b0;
    end
  end

endmodule
