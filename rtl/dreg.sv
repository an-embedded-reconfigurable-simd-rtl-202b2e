// dreg: data register file of one processing unit.
//
// Sixteen 16-bit registers (AX0 AX1 MX0 MX1 AY0 AY1 MY0 MY1 MR2 MR1 MR0 AR
// SR2 SR1 SR0 SI, numbered 0..15 in that order) in a primary and a secondary
// set; bank selects the set, so an interrupt handler can switch sets instead
// of saving registers. Ports, as the document gives them: three 16-bit read
// ports and one 40-bit read port (the MR or SR group, MR2/SR2 supplying bits
// 39:32), one 40-bit write port and two 16-bit write ports. The 40-bit write
// port writes the MR group, the SR group (the top byte sign-extended into
// MR2/SR2) or one register (low 16 bits). Reads are combinational, writes
// take effect at the rising clock edge; if ports collide, port b wins over
// port a, which wins over the wide port (own choice). mr_tap is the current
// MR group, wired to the vector adder. Reset clears both sets (own choice).
module dreg
  import dsp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        bank,
  input  reg_e        ra, rb, rc,
  output logic [15:0] rda, rdb, rdc,
  input  logic        rw_sr,          // wide read: 0 = MR group, 1 = SR group
  output logic [39:0] rdw,
  input  wide_kind_e  ww_kind,
  input  reg_e        ww_reg,
  input  logic [39:0] ww_data,
  input  logic        wa_en,
  input  reg_e        wa_reg,
  input  logic [15:0] wa_data,
  input  logic        wb_en,
  input  reg_e        wb_reg,
  input  logic [15:0] wb_data,
  output logic [39:0] mr_tap
);
  logic [15:0] rf [2][NREG];

  function automatic logic [39:0] grp(input logic [15:0] r2, r1, r0);
    return {r2[7:0], r1, r0};
  endfunction

  assign rda    = rf[bank][ra];
  assign rdb    = rf[bank][rb];
  assign rdc    = rf[bank][rc];
  assign rdw    = rw_sr ? grp(rf[bank][R_SR2], rf[bank][R_SR1], rf[bank][R_SR0])
                        : grp(rf[bank][R_MR2], rf[bank][R_MR1], rf[bank][R_MR0]);
  assign mr_tap = grp(rf[bank][R_MR2], rf[bank][R_MR1], rf[bank][R_MR0]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < 2; b++)
        for (int r = 0; r < NREG; r++) rf[b][r] <= '0;
    end else begin
      unique case (ww_kind)
        WW_MR: begin
          rf[bank][R_MR2] <= {{8{ww_data[39]}}, ww_data[39:32]};
          rf[bank][R_MR1] <= ww_data[31:16];
          rf[bank][R_MR0] <= ww_data[15:0];
        end
        WW_SR: begin
          rf[bank][R_SR2] <= {{8{ww_data[39]}}, ww_data[39:32]};
          rf[bank][R_SR1] <= ww_data[31:16];
          rf[bank][R_SR0] <= ww_data[15:0];
        end
        WW_ONE:  rf[bank][ww_reg] <= ww_data[15:0];
        default: ;
      endcase
      if (wa_en) rf[bank][wa_reg] <= wa_data;
      if (wb_en) rf[bank][wb_reg] <= wb_data;
    end
  end
endmodule
