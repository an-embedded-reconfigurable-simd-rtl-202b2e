// vector_adder: adds up the accumulators of the selected datapaths in one
// cycle (combinational), e.g. to finish an FIR whose taps were spread over
// the datapaths.
// 16-bit mode: the 40-bit MR of every DP whose sel bit is set are summed at
// 43 bits and saturated to 40 bits (sum[39:0]; sum[79:40] is its sign).
// 32-bit mode: the two 80-bit accumulators of the 32-bit datapaths
// (acc[0] of group A, acc[1] of group B; sel bits 0 and 4) are summed at 81
// bits and saturated to 80 bits. ovf flags a saturated result.
// The document gives only the function; the widths and the saturation are
// this design's choice.
module vector_adder #(
  parameter int unsigned N = 8
) (
  input  logic          w32,
  input  logic [N-1:0]  sel,
  input  logic [39:0]   mr  [N],
  input  logic [79:0]   acc [2],
  output logic [79:0]   sum,
  output logic          ovf
);
  localparam int unsigned SW = 40 + $clog2(N) + 1;
  logic signed [SW-1:0] s16;
  logic signed [80:0]   s32;

  always_comb begin
    s16 = '0;
    for (int i = 0; i < int'(N); i++)
      if (sel[i]) s16 = s16 + SW'($signed(mr[i]));
    s32 = '0;
    if (sel[0])     s32 = s32 + 81'($signed(acc[0]));
    if (sel[N/2])   s32 = s32 + 81'($signed(acc[1]));
    if (w32) begin
      ovf = (s32[80] != s32[79]);
      sum = ovf ? (s32[80] ? {1'b1, 79'd0} : {1'b0, {79{1'b1}}}) : s32[79:0];
    end else begin
      ovf = (s16[SW-1:39] != {(SW-39){s16[39]}});
      if (ovf) sum = s16[SW-1] ? {{41{1'b1}}, 39'd0} : {41'd0, {39{1'b1}}};
      else     sum = 80'($signed(s16[39:0]));
    end
  end
endmodule
