// cfg_regs: parameter and diagnostic registers behind the I2C port.
//
// Register map (7-bit address, one byte each):
//   0x00 .. 0x1D  para[8a+7 : 8a]        240 parameter bits, read/write
//   0x1E .. 0x22  diag[8(a-30)+7 : ...]   40 diagnostic bits, read-only
// Other addresses read as 0 and ignore writes. The parameter bits are
// triple-redundant (tmr_reg) and drive the chip on para. The diagnostic
// register copies diag_in (written by the chip logic) every clock. When
// the three test bits para[2:0] are all 1, the diagnostic register stops
// following diag_in and becomes writable over I2C, so that its read-back
// path can be checked. rd_data is combinational from reg_addr.
// Map, sizes, TMR and the test bits are the TDS's; the meaning of each
// parameter and diagnostic bit is set by the chip that uses this block.
module cfg_regs
  import tds_pkg::*;
#(
  parameter logic [N_PARA-1:0] PARA_RST = '0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [6:0]        reg_addr,
  input  logic              wr_en,
  input  logic [7:0]        wr_data,
  output logic [7:0]        rd_data,
  output logic [N_PARA-1:0] para,
  input  logic [N_DIAG-1:0] diag_in,
  output logic [N_DIAG-1:0] diag
);

  localparam int unsigned NP = N_PARA / 8;   // 30
  localparam int unsigned ND = N_DIAG / 8;   // 5

  logic [N_PARA-1:0] be;
  logic              para_we, test_mode;

  always_comb begin
    be = '0;
    if (32'(reg_addr) < NP) be[8*reg_addr +: 8] = 8'hFF;
    para_we = wr_en && (32'(reg_addr) < NP);
  end

  tmr_reg #(.W(N_PARA), .RST(PARA_RST)) u_para (
    .clk(clk), .rst_n(rst_n), .we(para_we), .be(be),
    .d({NP{wr_data}}), .q(para)
  );

  assign test_mode = (para[2:0] == 3'b111);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      diag <= '0;
    end else if (!test_mode) begin
      diag <= diag_in;
    end else if (wr_en && 32'(reg_addr) >= NP && 32'(reg_addr) < NP + ND) begin
      diag[8*(reg_addr - 7'(NP)) +: 8] <= wr_data;
    end
  end

  always_comb begin
    rd_data = '0;
    if (32'(reg_addr) < NP)           rd_data = para[8*reg_addr +: 8];
    else if (32'(reg_addr) < NP + ND) rd_data = diag[8*(reg_addr - 7'(NP)) +: 8];
  end

endmodule
