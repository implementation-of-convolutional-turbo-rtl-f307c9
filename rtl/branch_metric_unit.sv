// branch_metric_unit - branch metrics (GAMMA) of the double-binary max-log-MAP
// decoder, normalised to the all-zero branch.
//
// A branch of the 8-state trellis carries the label {a, b, y, w}: its input
// couple and its two parity bits. Its metric is the correlation of the label
// with the received soft values plus the a-priori term of its couple,
//   G{a,b,y,w} = a*R_A + b*R_B + y*R_Y + w*R_W + Le(a,b),  Le(0,0) = 0,
// which is the +-1 correlation with the all-zero branch subtracted. Only 15
// distinct values exist per symbol (G{0000} = 0), each needing 4 to 7 bits;
// gamma[0] is tied to zero so users can index by label. Each metric is a
// small multi-operand adder; the tool maps them to carry-save trees.
//
// Interface and timing: purely combinational. Received values are 4-bit
// two's complement (positive means bit 1), a-priori values 6-bit.
module branch_metric_unit
  import ctc_pkg::*;
(
  input  rx_t ra,
  input  rx_t rb,
  input  rx_t ry,
  input  rx_t rw,
  input  le_t le01,
  input  le_t le10,
  input  le_t le11,
  output bm_t gamma [16]
);
  always_comb begin
    for (int l = 0; l < 16; l++) begin
      bm_t acc;
      acc = '0;
      if (l[3]) acc = acc + bm_t'(ra);
      if (l[2]) acc = acc + bm_t'(rb);
      if (l[1]) acc = acc + bm_t'(ry);
      if (l[0]) acc = acc + bm_t'(rw);
      case (l[3:2])
        2'b01:   acc = acc + bm_t'(le01);
        2'b10:   acc = acc + bm_t'(le10);
        2'b11:   acc = acc + bm_t'(le11);
        default: ;
      endcase
      gamma[l] = acc;
    end
  end
endmodule
