// johnson_counter: twisted ring counter. Each enabled clock the register
// shifts up by one and the inverted top bit enters at bit 0, so a 5-bit
// counter runs 00000, 00001, 00011, 00111, 01111, 11111, 11110, 11100, 11000,
// 10000 and back: 2*W states. In the second segmentation method its state is
// the port enable of the W one-port BRAMs while the SU walks the nine pixel
// columns shared by five neighbouring small windows: bit b is set exactly for
// the windows that contain the current column. `init` (priority over `en`)
// loads the first non-zero state 0...01; `clr` loads all zeros. Synchronous
// active-low reset to zero.
module johnson_counter #(
  parameter int unsigned W = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         init,
  input  logic         en,
  output logic [W-1:0] q
);
  always_ff @(posedge clk) begin
    if (!rst_n || clr) q <= '0;
    else if (init)     q <= W'(1);
    else if (en)       q <= {q[W-2:0], ~q[W-1]};
  end
endmodule
