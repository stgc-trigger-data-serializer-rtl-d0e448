// pad_tds: the pad trigger data serializer.
//
// Every bunch crossing it sends the yes/no pattern of its 96 pads to the
// pad-trigger logic: a pad is "yes" if a leading edge of its VMM pulse
// fell into that BC. Blocks: leading-edge detection with per-group clock
// phase and the 2-deep pad buffer (pad_pulse_det), the BCID counter
// (bcid_gen, 12-bit offset, phase of the local 40 MHz BC clock in
// 6.25 ns steps), the frame builder with CRC-8 and scrambler
// (pad_frame_builder), the 30:1 serializer (gbt_ser) and the I2C
// configuration (i2c_slave, cfg_regs).
//
// Clocks as in strip_tds: clk 320 MHz (8 cycles per BC), clk_ser 15 x clk.
// A frame of 120 bits leaves as four 30-bit words per BC; frame_start marks
// the first. The BCID in a frame is the counter value at the BC start
// that released the flags; the offset register absorbs the fixed delay.
// Parameter bits, this design's assignment:
//   para[2:0] test bits  para[14:3] BCID offset  para[16:15] BC clock phase
//   para[28:17] phase of pad group g at [17+2g +: 2]  para[29] PRBS-31
//   para[125:30] channel enables (reset value: all enabled)
// Diagnostic bits: [11:0] BCID of the last frame, [18:12] pads "yes" in
//   it, [39:19] frames sent.
module pad_tds
  import tds_pkg::*;
(
  input  logic              clk,
  input  logic              clk_ser,
  input  logic              rst_n,
  input  logic [2:0]        chip_id,
  input  logic              scl,
  input  logic              sda_in,
  output logic              sda_oe,
  input  logic [N_PAD-1:0]  pad_in,
  output logic              ser_out,
  output logic [PKT_W-1:0]  word,
  output logic              frame_start
);

  localparam logic [N_PARA-1:0] PARA_RST = {{(N_PARA-126){1'b0}}, {N_PAD{1'b1}}, 30'd0};

  logic [N_PARA-1:0] para;
  logic [N_DIAG-1:0] diag_in, diag;
  logic [6:0]        reg_addr;
  logic              reg_we;
  logic [7:0]        reg_wdata, reg_rdata;

  i2c_slave u_i2c (
    .clk(clk), .rst_n(rst_n), .chip_id(chip_id), .scl(scl), .sda_in(sda_in),
    .sda_oe(sda_oe), .reg_addr(reg_addr), .wr_en(reg_we), .wr_data(reg_wdata),
    .rd_data(reg_rdata)
  );

  cfg_regs #(.PARA_RST(PARA_RST)) u_cfg (
    .clk(clk), .rst_n(rst_n), .reg_addr(reg_addr), .wr_en(reg_we),
    .wr_data(reg_wdata), .rd_data(reg_rdata), .para(para),
    .diag_in(diag_in), .diag(diag)
  );

  logic              bc_start, ce160, bcid_flag;
  logic [2:0]        phase;
  logic [BCID_W-1:0] bcid;
  logic [N_PAD-1:0]  flags;

  bcid_gen u_bcid (
    .clk(clk), .rst_n(rst_n), .bcid_offset(para[14:3]), .bc_phase(para[16:15]),
    .win_sel(3'd0), .bc_start(bc_start), .phase(phase), .bcid(bcid),
    .bcid_flag(bcid_flag)
  );

  assign ce160 = phase[0];

  pad_pulse_det u_det (
    .clk(clk), .rst_n(rst_n), .pad_in(pad_in), .ch_en(para[125:30]),
    .grp_phase(para[28:17]), .phase(phase), .bc_start(bc_start), .flags(flags)
  );

  pad_frame_builder u_fb (
    .clk(clk), .rst_n(rst_n), .bc_start(bc_start), .ce160(ce160),
    .prbs_en(para[29]), .flags(flags), .bcid(bcid), .word(word),
    .frame_start(frame_start)
  );

  gbt_ser #(.W(PKT_W)) u_ser (
    .clk_ser(clk_ser), .rst_n(rst_n), .word(word), .sout(ser_out), .load()
  );

  logic [11:0] last_bcid;
  logic [6:0]  last_yes;
  logic [20:0] n_frames;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_bcid <= '0;
      last_yes  <= '0;
      n_frames  <= '0;
    end else if (bc_start) begin
      last_bcid <= bcid;
      last_yes  <= 7'($countones(flags));
      n_frames  <= n_frames + 21'd1;
    end
  end

  assign diag_in = {n_frames, last_yes, last_bcid};

endmodule
