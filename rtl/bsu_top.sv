// bsu_top: digital part of a modulator-less beam steering transmitter.
//
// Four PLLs, one per antenna, take their reference from this block. Delaying
// a PLL's reference shifts the phase of its RF output, so the block steers a
// phased array by giving each channel its own reference delay, and it sends
// PSK data by adding the same symbol rotation to all channels at once: the
// relative phases, and so the beam, stay put while the common phase carries
// the symbols. No RF modulator is needed.
//
// Parts: mod_ctrl (symbol timer and phase adder), phase_lut (output phase to
// PTW, undoing the phase scrambling of the integer-N PLLs) and pcu (tuning
// registers and synchronous delay lines). With mod_en_i low the tuning
// registers are written directly through host_ptw_* (used to set fixed
// steering angles or to sweep the PTWs for calibration); with mod_en_i high
// the modulator writes them once per symbol. The LUT can be rewritten
// through lut_wr_* with calibrated values.
//
// Clocking: one clock, clk, the fast delay-line clock (256 MHz in the
// prototype). ref_i is the 1 MHz reference square wave, synchronous to clk
// with a period of exactly 2**PTW_W clk cycles and 50 % duty. The
// microcontroller that drives the configuration inputs, the clock sources
// and the PLLs are outside this block.
module bsu_top #(
  parameter int unsigned N_CH        = bsu_pkg::N_CH,
  parameter int unsigned PTW_W       = bsu_pkg::PTW_W,
  parameter int unsigned PLL_M       = bsu_pkg::PLL_M,
  parameter bit          USE_XOR_MSB = 1'b1,
  parameter int unsigned CYC_W       = 20
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ref_i,
  // direct tuning-register access (mod_en_i low)
  input  logic [PTW_W-1:0] host_ptw_i,
  input  logic [N_CH-1:0]  host_ptw_sel_i,
  // modulator configuration
  input  logic             mod_en_i,
  input  logic [3:0]       psk_bits_i,
  input  logic [CYC_W-1:0] sym_cyc_i,
  input  logic [PTW_W-1:0] beta_i [N_CH],
  // symbol stream
  input  logic             sym_valid_i,
  input  logic [PTW_W-1:0] sym_data_i,
  output logic             sym_ready_o,
  output logic             sym_underrun_o,
  output logic             sym_tick_o,
  // LUT calibration
  input  logic             lut_wr_en_i,
  input  logic [PTW_W-1:0] lut_wr_addr_i,
  input  logic [PTW_W-1:0] lut_wr_data_i,
  output logic             lut_ready_o,
  // to the PLL reference inputs
  output logic [PTW_W-1:0] ptw_o [N_CH],
  output logic [N_CH-1:0]  ref_o
);

  logic [PTW_W-1:0] lut_addr, lut_data;
  logic [PTW_W-1:0] mod_wdata;
  logic [N_CH-1:0]  mod_we;
  logic [PTW_W-1:0] pcu_wdata;
  logic [N_CH-1:0]  pcu_we;

  phase_lut #(.PTW_W(PTW_W), .PLL_M(PLL_M)) u_lut (
    .clk         (clk),
    .rst_n       (rst_n),
    .wr_en_i     (lut_wr_en_i),
    .wr_addr_i   (lut_wr_addr_i),
    .wr_data_i   (lut_wr_data_i),
    .rd_addr_i   (lut_addr),
    .rd_data_o   (lut_data),
    .init_done_o (lut_ready_o)
  );

  mod_ctrl #(.N_CH(N_CH), .PTW_W(PTW_W), .CYC_W(CYC_W)) u_mod (
    .clk         (clk),
    .rst_n       (rst_n),
    .enable_i    (mod_en_i),
    .psk_bits_i  (psk_bits_i),
    .sym_cyc_i   (sym_cyc_i),
    .beta_i      (beta_i),
    .sym_valid_i (sym_valid_i),
    .sym_data_i  (sym_data_i),
    .sym_ready_o (sym_ready_o),
    .underrun_o  (sym_underrun_o),
    .sym_tick_o  (sym_tick_o),
    .lut_ready_i (lut_ready_o),
    .lut_addr_o  (lut_addr),
    .lut_data_i  (lut_data),
    .ptw_wdata_o (mod_wdata),
    .ptw_we_o    (mod_we)
  );

  // The modulator owns the tuning registers while it is enabled.
  always_comb begin
    if (mod_en_i) begin
      pcu_wdata = mod_wdata;
      pcu_we    = mod_we;
    end else begin
      pcu_wdata = host_ptw_i;
      pcu_we    = host_ptw_sel_i;
    end
  end

  pcu #(.N_CH(N_CH), .PTW_W(PTW_W), .USE_XOR_MSB(USE_XOR_MSB)) u_pcu (
    .clk         (clk),
    .rst_n       (rst_n),
    .ref_i       (ref_i),
    .ptw_wdata_i (pcu_wdata),
    .ptw_we_i    (pcu_we),
    .ptw_o       (ptw_o),
    .ref_o       (ref_o)
  );

endmodule
