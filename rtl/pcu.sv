// pcu: Phase Control Unit, the all-digital replacement for the DDS stage of a
// DDS-PLL phase shifter.
//
// One reference square wave (ref_i, period 2**PTW_W fast-clock cycles, 50 %
// duty) feeds N_CH synchronous delay lines. Each line delays it by its own
// Phase Tuning Word, held in a tuning register; the delayed references
// (ref_o) drive the reference inputs of the N_CH PLLs. The registers are
// loaded from one shared data bus (ptw_wdata_i) with one enable per channel
// (ptw_we_i), as in the PCU netlist (bypass_ex, bypass_s, bypass_c0..c3,
// delay_block c0..c3, output[3..0]).
//
// Timing: a PTW written in cycle t is in the register at t+1 and sets the
// delay of the following references: ref_o[c](t) = ref_i(t - PTW_c - 1).
// Choice of this design: the fast clock clk also clocks the registers, so
// writes need no clock-domain crossing.
module pcu #(
  parameter int unsigned N_CH        = 4,
  parameter int unsigned PTW_W       = 8,
  parameter bit          USE_XOR_MSB = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ref_i,
  input  logic [PTW_W-1:0] ptw_wdata_i,
  input  logic [N_CH-1:0]  ptw_we_i,
  output logic [PTW_W-1:0] ptw_o [N_CH],
  output logic [N_CH-1:0]  ref_o
);

  ptw_regs #(.N_CH(N_CH), .PTW_W(PTW_W)) u_regs (
    .clk     (clk),
    .rst_n   (rst_n),
    .wdata_i (ptw_wdata_i),
    .we_i    (ptw_we_i),
    .ptw_o   (ptw_o)
  );

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    sdl #(.PTW_W(PTW_W), .USE_XOR_MSB(USE_XOR_MSB)) u_sdl (
      .clk   (clk),
      .rst_n (rst_n),
      .ptw_i (ptw_o[c]),
      .ref_i (ref_i),
      .ref_o (ref_o[c])
    );
  end

endmodule
