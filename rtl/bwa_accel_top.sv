// bwa_accel_top: short-read mapping accelerator, N_CH channels side by side.
//
// Each channel couples N_PE processing elements to its own DDR3 memory,
// which holds a full copy of the encoded occurrence array; with the default
// two channels of 32 PEs, 64 reads are mapped at once. The host link (PCI
// Express in the original architecture) is not part of this RTL: its streams appear as
// ports, one read input and one result output per channel, and the
// reference description (C(a), row of '$', last row) as a shared input that
// the host sets before sending reads. The DDR3 controllers are likewise
// outside; each channel brings out the controller's user port with its own
// clock (200 MHz in the original architecture, against 80 MHz for the accelerator clock).
module bwa_accel_top
  import bwa_pkg::*;
#(
  parameter int unsigned N_CH        = 2,
  parameter int unsigned N_PE        = 32,
  parameter int unsigned STACK_DEPTH = 1024,
  parameter int unsigned AFIFO_DEPTH = 16,
  parameter int unsigned RFIFO_DEPTH = 32
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  ref_cfg_t                    cfg,

  input  logic [N_CH-1:0]             read_valid,
  output logic [N_CH-1:0]             read_ready,
  input  read_t                       read_in   [N_CH],

  output logic [N_CH-1:0]             res_valid,
  input  logic [N_CH-1:0]             res_ready,
  output result_t                     res_out   [N_CH],

  output logic [N_CH-1:0][N_PE-1:0]   pe_busy,

  input  logic [N_CH-1:0]             ddr_clk,
  input  logic [N_CH-1:0]             ddr_rst_n,
  output logic [N_CH-1:0]             ddr_read,
  output logic [N_CH-1:0][ADDR_W-1:0] ddr_addr,
  input  logic [N_CH-1:0]             ddr_ready,
  input  logic [N_CH-1:0]             ddr_rdata_valid,
  input  logic [N_CH-1:0][DDR_W-1:0]  ddr_rdata
);

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    bwa_channel #(
      .N_PE(N_PE), .STACK_DEPTH(STACK_DEPTH),
      .AFIFO_DEPTH(AFIFO_DEPTH), .RFIFO_DEPTH(RFIFO_DEPTH)
    ) u_ch (
      .clk, .rst_n, .cfg,
      .read_valid     (read_valid[c]),
      .read_ready     (read_ready[c]),
      .read_in        (read_in[c]),
      .res_valid      (res_valid[c]),
      .res_ready      (res_ready[c]),
      .res_out        (res_out[c]),
      .pe_busy        (pe_busy[c]),
      .ddr_clk        (ddr_clk[c]),
      .ddr_rst_n      (ddr_rst_n[c]),
      .ddr_read       (ddr_read[c]),
      .ddr_addr       (ddr_addr[c]),
      .ddr_ready      (ddr_ready[c]),
      .ddr_rdata_valid(ddr_rdata_valid[c]),
      .ddr_rdata      (ddr_rdata[c])
    );
  end

endmodule
