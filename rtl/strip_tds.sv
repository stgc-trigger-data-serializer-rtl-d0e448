// strip_tds: the strip trigger data serializer.
//
// For each pad-trigger road it sends the charges of the 15 strips under
// the road, with BCID, band-ID and phi-ID, to the router at 4.8 Gb/s.
//
//  VMM interface  132 channels (128 own strips, 2 neighbour strips from
//                 each adjacent TDS) are deserialized (vmm_deser); each hit
//                 gets the BCID and BCID flag of the dual BCID counter
//                 (bcid_gen) and waits in a 4-deep ring buffer.
//  Preprocessor   the pad-trigger lines are decoded (pad_trig_if), the
//                 band-ID is looked up in the 8-road table (pad_lut) to get
//                 the first strip of a 17-strip window, every ring buffer
//                 is searched for the road's BCID, 17 8-to-1 selectors and
//                 the strip sequencer pick the window and its first or last
//                 15 strips.
//  Serialization  frame build with CRC-4, FIFO and scrambler
//                 (strip_frame_builder), 30-bit words at 160 MHz, and the
//                 30:1 serializer (gbt_ser) on clk_ser.
//  Configuration  I2C port (i2c_slave) and TMR registers (cfg_regs).
//
// Clocks: clk is the 320 MHz VMM bit clock (8 cycles per BC); clk_ser is
// the 4.8 GHz serializer bit clock, 15 times clk and phase-locked to it.
// word/frame_start show the parallel serializer input (word changes every
// second clk cycle).
// Parameter bits (I2C registers 0x00-0x1D), this design's assignment:
//   para[2:0] test bits      para[14:3] BCID offset   para[17:15] window
//   para[18]  send BCID+1 flagged hits (extension)    para[19] PRBS-31
//   para[20]  test pattern on the first 15 strips     para[26:21] its charge
//   para[28:27] BC clock phase                         para[148:29] road table
// Diagnostic bits: [11:0] last road BCID, [19:12] band-ID, [24:20] phi-ID,
//   [25] pad-trigger link locked, [33:26] dropped roads, [39:34] roads sent.
// Road latency: a frame's first word is on `word` at most 5 clk cycles
// (about 16 ns) after the last bit of the road word has arrived, the spread
// coming from waiting for the next 6.25 ns packet boundary; gbt_ser loads it
// within another 6.25 ns. The reference design reports about 50 ns for the
// path from decoded start strip to first serial bit.
module strip_tds
  import tds_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 4,
  parameter int unsigned MAX_AGE    = 8
) (
  input  logic               clk,
  input  logic               clk_ser,
  input  logic               rst_n,
  input  logic [2:0]         chip_id,
  input  logic               scl,
  input  logic               sda_in,
  output logic               sda_oe,
  input  logic [N_VMM-1:0]   vmm_sd,
  input  logic [N_NEIGH-1:0] neigh_lo,
  input  logic [N_NEIGH-1:0] neigh_hi,
  input  logic [1:0]         pad_line0,
  input  logic [1:0]         pad_line1,
  output logic               ser_out,
  output logic [PKT_W-1:0]   word,
  output logic               frame_start,
  output logic               road_locked
);

  localparam int unsigned N_PAT = 15;

  // ---------------- configuration ----------------
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

  cfg_regs u_cfg (
    .clk(clk), .rst_n(rst_n), .reg_addr(reg_addr), .wr_en(reg_we),
    .wr_data(reg_wdata), .rd_data(reg_rdata), .para(para),
    .diag_in(diag_in), .diag(diag)
  );

  logic [BCID_W-1:0] cfg_bcid_offset;
  logic [2:0]        cfg_win_sel;
  logic              cfg_ext_en, cfg_prbs_en, cfg_pat_en;
  logic [Q_W-1:0]    cfg_pat_q;
  logic [1:0]        cfg_bc_phase;
  logic [N_LUT*15-1:0] cfg_lut;

  assign cfg_bcid_offset = para[14:3];
  assign cfg_win_sel     = para[17:15];
  assign cfg_ext_en      = para[18];
  assign cfg_prbs_en     = para[19];
  assign cfg_pat_en      = para[20];
  assign cfg_pat_q       = para[26:21];
  assign cfg_bc_phase    = para[28:27];
  assign cfg_lut         = para[148:29];

  // ---------------- timing ----------------
  logic              bc_start, bcid_flag, ce160;
  logic [2:0]        phase;
  logic [BCID_W-1:0] bcid;

  bcid_gen u_bcid (
    .clk(clk), .rst_n(rst_n), .bcid_offset(cfg_bcid_offset),
    .bc_phase(cfg_bc_phase), .win_sel(cfg_win_sel), .bc_start(bc_start),
    .phase(phase), .bcid(bcid), .bcid_flag(bcid_flag)
  );

  assign ce160 = phase[0];

  // ---------------- VMM interface ----------------
  logic [N_CH-1:0]  sd_all, sd_in;
  logic [N_PAT-1:0] pat_sd;

  assign sd_all = {neigh_hi, vmm_sd, neigh_lo};

  for (genvar p = 0; p < N_PAT; p++) begin : g_pat
    serial_pattern u_pat (
      .clk(clk), .rst_n(rst_n), .fire(cfg_pat_en && bc_start),
      .charge(cfg_pat_q), .sdout(pat_sd[p]), .busy()
    );
  end

  always_comb begin
    sd_in = sd_all;
    if (cfg_pat_en) sd_in[N_NEIGH +: N_PAT] = pat_sd;
  end

  // ---------------- preprocessor: road ----------------
  logic  rv, lut_valid, lut_hit, seq_valid, seq_last;
  road_t road, lut_road, seq_road;
  logic [6:0] lut_start;
  logic hdr_err;

  pad_trig_if u_ptif (
    .clk(clk), .rst_n(rst_n), .line0(pad_line0), .line1(pad_line1),
    .locked(road_locked), .road_valid(rv), .road(road), .hdr_error(hdr_err)
  );

  pad_lut u_lut (
    .clk(clk), .rst_n(rst_n), .table_bits(cfg_lut), .road_valid(rv), .road(road),
    .road_out_valid(lut_valid), .road_out(lut_road), .hit(lut_hit), .start(lut_start)
  );

  // ---------------- ring buffers ----------------
  strip_t strips [N_CH];

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    logic      hv;
    rb_entry_t ent;
    vmm_deser u_des (
      .clk(clk), .rst_n(rst_n), .ch_en(1'b1), .sdin(sd_in[c]), .bcid(bcid),
      .bcid_flag(bcid_flag), .hit_valid(hv), .entry(ent)
    );
    ring_buffer #(.DEPTH(4), .MAX_AGE(MAX_AGE)) u_rb (
      .clk(clk), .rst_n(rst_n), .wr(hv), .wr_entry(ent), .bc_start(bc_start),
      .cur_bcid_lsb(bcid[3:0]), .trig_bcid(lut_road.bcid), .ext_en(cfg_ext_en),
      .rd(strips[c])
    );
  end

  // ---------------- 8-1 selectors and sequencer ----------------
  strip_t         lines [WIN];
  logic [Q_W-1:0] charges [N_OUT];
  logic [4:0]     n_hits;

  strip_sel u_sel (.strips(strips), .start(lut_start), .lines(lines));

  strip_seq u_seq (
    .clk(clk), .rst_n(rst_n), .in_valid(lut_valid && lut_hit), .lines(lines),
    .start(lut_start), .out_valid(seq_valid), .charges(charges),
    .sel_last(seq_last), .n_hits(n_hits)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) seq_road <= '0;
    else if (lut_valid && lut_hit) seq_road <= lut_road;
  end

  // ---------------- serialization ----------------
  logic overflow;

  strip_frame_builder #(.FIFO_DEPTH(FIFO_DEPTH)) u_fb (
    .clk(clk), .rst_n(rst_n), .ce160(ce160), .prbs_en(cfg_prbs_en),
    .in_valid(seq_valid), .road(seq_road), .charges(charges),
    .word(word), .frame_start(frame_start), .overflow(overflow)
  );

  gbt_ser #(.W(PKT_W)) u_ser (
    .clk_ser(clk_ser), .rst_n(rst_n), .word(word), .sout(ser_out), .load()
  );

  // ---------------- diagnostics ----------------
  logic [7:0] n_drop;
  logic [5:0] n_sent;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_drop <= '0;
      n_sent <= '0;
    end else begin
      if (overflow && n_drop != 8'hFF) n_drop <= n_drop + 8'd1;
      if (frame_start) n_sent <= n_sent + 6'd1;
    end
  end

  assign diag_in = {n_sent, n_drop, road_locked, seq_road.phi, seq_road.band, seq_road.bcid};

endmodule
