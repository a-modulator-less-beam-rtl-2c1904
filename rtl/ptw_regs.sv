// ptw_regs: the tuning registers of the Phase Control Unit.
//
// One PTW_W-bit register per delay channel holds that channel's Phase Tuning
// Word. All registers share one write-data bus (wdata_i); bit c of the
// one-hot-or-more enable vector we_i loads register c on the next clock
// edge, so one bus can update any subset of channels in the same cycle. This
// is the bypass_c0..c3 register bank of the PCU netlist, with its shared
// data input (bypass_ex) and per-channel enables (bypass_s).
//
// Timing: ptw_o[c] shows wdata_i one cycle after we_i[c] is high.
// Choice of this design: active-low asynchronous reset to PTW 0 (no delay).
module ptw_regs #(
  parameter int unsigned N_CH  = 4,
  parameter int unsigned PTW_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [PTW_W-1:0] wdata_i,
  input  logic [N_CH-1:0]  we_i,
  output logic [PTW_W-1:0] ptw_o [N_CH]
);

  for (genvar c = 0; c < N_CH; c++) begin : g_reg
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)        ptw_o[c] <= '0;
      else if (we_i[c])  ptw_o[c] <= wdata_i;
    end
  end

endmodule
