// mod_ctrl: turns the Beam Steering Unit into a PSK transmitter.
//
// Every channel c must carry the phase alpha + beta[c], where alpha is the
// rotation of the PSK symbol being sent (the same on all channels) and
// beta[c] is the steering offset of that channel (it sets the beam
// direction and changes only rarely). Phases are kept as unsigned
// PTW_W-bit fractions of a turn, so the sum wraps by itself and needs no
// modulo operation. For a 2**p-PSK constellation (p = psk_bits_i, 1..PTW_W)
// symbol m gives alpha = m * 2**(PTW_W - p). The sum is the pointer PTR into
// the phase LUT, whose entry is the PTW to load into channel c.
//
// A symbol timer counts sym_cyc_i fast-clock cycles per symbol (32000 for
// 8 kbaud at 256 MHz). At every symbol boundary the controller takes the
// next symbol from the valid/ready input (sym_ready_o is a one-cycle pulse);
// if none is waiting it keeps the previous alpha and pulses underrun_o. It
// then runs one update: the LUT is read for channel 0, 1, ... N_CH-1 in
// consecutive cycles and each PTW is written, one cycle after its read, to
// the tuning registers through ptw_wdata_o / ptw_we_o. Steering changes
// (beta_i) therefore take effect at the next symbol boundary. The first
// boundary is the first cycle in which enable_i is high, the LUT is filled
// and no earlier update is still being written.
//
// Timing: from a symbol boundary, the write to channel c happens c + 2
// cycles later; all channels are updated N_CH + 1 cycles after the
// boundary, a negligible part of a symbol.
//
// ptw_wdata_o is the LUT read data itself: the LUT's output register is the
// pipeline stage between the read and the register write.
//
// Choices of this design: sequential per-channel writes through one LUT
// read port; hold-last-symbol on underrun; sym_cyc_i below N_CH + 2 is
// treated as N_CH + 2 so that updates never overlap.
module mod_ctrl #(
  parameter int unsigned N_CH    = 4,
  parameter int unsigned PTW_W   = 8,
  parameter int unsigned CYC_W   = 20
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable_i,
  input  logic [3:0]       psk_bits_i,      // p of 2**p-PSK, 1..PTW_W
  input  logic [CYC_W-1:0] sym_cyc_i,       // clock cycles per symbol
  input  logic [PTW_W-1:0] beta_i [N_CH],   // steering offsets
  // symbol stream
  input  logic             sym_valid_i,
  input  logic [PTW_W-1:0] sym_data_i,
  output logic             sym_ready_o,
  output logic             underrun_o,
  output logic             sym_tick_o,      // symbol boundary
  // phase LUT read port
  input  logic             lut_ready_i,
  output logic [PTW_W-1:0] lut_addr_o,
  input  logic [PTW_W-1:0] lut_data_i,
  // tuning register write port
  output logic [PTW_W-1:0] ptw_wdata_o,
  output logic [N_CH-1:0]  ptw_we_o
);

  localparam int unsigned CH_W = (N_CH > 1) ? $clog2(N_CH) : 1;
  localparam logic [CYC_W-1:0] MIN_CYC = CYC_W'(N_CH + 2);

  logic             running;
  logic [CYC_W-1:0] cyc_cnt;
  logic             tick;
  logic [PTW_W-1:0] alpha;
  logic [PTW_W-1:0] alpha_next;
  logic [PTW_W-1:0] sym_mask;
  logic [3:0]       shamt;

  // Update pipeline: stage 0 issues the LUT read, stage 1 writes the result.
  logic             upd_busy;
  logic [CH_W-1:0]  upd_ch;
  logic             wr_pend;
  logic [CH_W-1:0]  wr_ch;

  logic [CYC_W-1:0] period;
  assign period = (sym_cyc_i < MIN_CYC) ? MIN_CYC : sym_cyc_i;

  // Symbol timer: the first boundary comes as soon as the controller is
  // enabled, the LUT is ready and no update is still in progress; later
  // ones every period cycles.
  logic upd_idle;
  assign upd_idle = !upd_busy && !wr_pend;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      cyc_cnt <= '0;
    end else if (!(enable_i && lut_ready_i)) begin
      running <= 1'b0;
      cyc_cnt <= '0;
    end else if (tick) begin
      running <= 1'b1;
      cyc_cnt <= '0;
    end else if (running) begin
      cyc_cnt <= cyc_cnt + 1'b1;
    end
  end
  assign tick       = enable_i && lut_ready_i &&
                      (running ? (cyc_cnt == period - 1'b1) : upd_idle);
  assign sym_tick_o = tick;

  // alpha = m * 2**(PTW_W - p); p outside 1..PTW_W is read as PTW_W.
  always_comb begin
    logic [3:0] p;
    p = (psk_bits_i == 4'd0 || psk_bits_i > 4'(PTW_W)) ? 4'(PTW_W) : psk_bits_i;
    shamt    = 4'(PTW_W) - p;
    sym_mask = PTW_W'((1 << p) - 1);
    alpha_next = (sym_data_i & sym_mask) << shamt;
  end

  assign sym_ready_o = tick && sym_valid_i;
  assign underrun_o  = tick && !sym_valid_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      alpha    <= '0;
      upd_busy <= 1'b0;
      upd_ch   <= '0;
      wr_pend  <= 1'b0;
      wr_ch    <= '0;
    end else begin
      if (tick && sym_valid_i) alpha <= alpha_next;
      wr_pend <= upd_busy;
      wr_ch   <= upd_ch;
      if (tick) begin
        upd_busy <= 1'b1;
        upd_ch   <= '0;
      end else if (upd_busy) begin
        if (upd_ch == CH_W'(N_CH - 1)) upd_busy <= 1'b0;
        else                           upd_ch   <= upd_ch + 1'b1;
      end
    end
  end

  // PTR = alpha + beta[c], wrapping modulo one turn.
  assign lut_addr_o  = alpha + beta_i[upd_ch];
  assign ptw_wdata_o = lut_data_i;
  always_comb begin
    ptw_we_o = '0;
    if (wr_pend) ptw_we_o[wr_ch] = 1'b1;
  end

  // One tuning register per cycle, and never a write without an update.
  a_one_write: assert property (@(posedge clk) disable iff (!rst_n)
                                $onehot0(ptw_we_o) && (ptw_we_o == '0 || wr_pend));
  // A symbol is only taken at a boundary.
  a_ready_at_tick: assert property (@(posedge clk) disable iff (!rst_n)
                                    sym_ready_o |-> tick);

endmodule
