// pe: one processing element. It consumes one operand pair per enabled clock
// and keeps a running result in `acc`:
//   mode PE_DIST (simple cells): acc = sum |a - w|, the Manhattan distance
//                                between the input vector and a weight vector;
//   mode PE_MIN  (complex cells): acc = min a over the window.
// `first` marks the first element of a vector (the running value restarts),
// `last` the final one; `res_valid` is high for one clock after the last
// element, while `acc` holds the finished result. The result is held until
// the next `first`. Operands arrive one clock after the controller issues
// their addresses; the PE itself adds one register stage.
module pe
  import cnn_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     en,
  input  logic     first,
  input  logic     last,
  input  pe_mode_e mode,
  input  pix_t     a,
  input  pix_t     w,
  output acc_t     acc,
  output logic     res_valid
);
  pix_t diff;
  acc_t nxt;

  always_comb begin
    diff = (a > w) ? pix_t'(a - w) : pix_t'(w - a);
    if (mode == PE_DIST) nxt = (first ? acc_t'(0) : acc) + acc_t'(diff);
    else                 nxt = (first || acc_t'(a) < acc) ? acc_t'(a) : acc;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc       <= '0;
      res_valid <= 1'b0;
    end else begin
      res_valid <= en && last;
      if (en) acc <= nxt;
    end
  end
endmodule
