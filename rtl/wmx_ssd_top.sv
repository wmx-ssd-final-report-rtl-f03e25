// wmx_ssd_top: the FPGA-side custom hardware of an encrypting solid-state
// drive built from a soft processor, a DDR2 buffer, four NAND flash packages
// and a PCI Express link to the host.
//
// The processor firmware moves 4 KB blocks between the host link, the DDR2
// buffer, the AES engines and the flash. This top holds the logic that is
// not vendor IP:
//   - aes_encrypt_plb : AES-128 encryption peripheral on the processor bus
//   - aes_decrypt_plb : AES-128 decryption peripheral on the processor bus
//   - nand_fsl x NUM_CHIPS : one FSL peripheral with its NAND controller per
//     flash package, each package holding two dies (CE#/CE2#)
// The processor, its bus, the DDR2 memory controller, the PCI Express
// endpoint and the level-shifting CPLD are outside this module, so their
// connections are ports: the two slave-register bus attachments, one FSL
// channel pair per flash package, and the flash pins as seen from the FPGA
// (I/O split into out/in with a direction signal for the CPLD's tri-state
// buffers). Everything runs on one clock, clk, with a synchronous active-high
// reset rst; this single-clock arrangement is this design's choice.
module wmx_ssd_top
  import wmx_pkg::*;
#(
  parameter int unsigned NUM_CHIPS = 4   // flash packages on the module
) (
  input  logic                    clk,
  input  logic                    rst,
  // encryption peripheral bus attachment
  input  logic [31:0]             enc_Bus2IP_Data,
  input  logic [3:0]              enc_Bus2IP_BE,
  input  logic [AES_NUM_REGS-1:0] enc_Bus2IP_RdCE,
  input  logic [AES_NUM_REGS-1:0] enc_Bus2IP_WrCE,
  output logic [31:0]             enc_IP2Bus_Data,
  output logic                    enc_IP2Bus_RdAck,
  output logic                    enc_IP2Bus_WrAck,
  output logic                    enc_IP2Bus_Error,
  // decryption peripheral bus attachment
  input  logic [31:0]             dec_Bus2IP_Data,
  input  logic [3:0]              dec_Bus2IP_BE,
  input  logic [AES_NUM_REGS-1:0] dec_Bus2IP_RdCE,
  input  logic [AES_NUM_REGS-1:0] dec_Bus2IP_WrCE,
  output logic [31:0]             dec_IP2Bus_Data,
  output logic                    dec_IP2Bus_RdAck,
  output logic                    dec_IP2Bus_WrAck,
  output logic                    dec_IP2Bus_Error,
  // FSL channels, one pair per flash package
  input  logic [31:0]             fsl_s_data    [NUM_CHIPS],
  input  logic [NUM_CHIPS-1:0]    fsl_s_control,
  input  logic [NUM_CHIPS-1:0]    fsl_s_exists,
  output logic [NUM_CHIPS-1:0]    fsl_s_read,
  output logic [31:0]             fsl_m_data    [NUM_CHIPS],
  output logic [NUM_CHIPS-1:0]    fsl_m_control,
  output logic [NUM_CHIPS-1:0]    fsl_m_write,
  input  logic [NUM_CHIPS-1:0]    fsl_m_full,
  // flash pins, one set per package
  output logic [7:0]              nand_io_o     [NUM_CHIPS],
  input  logic [7:0]              nand_io_i     [NUM_CHIPS],
  output logic [NUM_CHIPS-1:0]    nand_io_dir,
  output logic [NUM_CHIPS-1:0]    nand_ce_n,
  output logic [NUM_CHIPS-1:0]    nand_ce2_n,
  output logic [NUM_CHIPS-1:0]    nand_cle,
  output logic [NUM_CHIPS-1:0]    nand_ale,
  output logic [NUM_CHIPS-1:0]    nand_we_n,
  output logic [NUM_CHIPS-1:0]    nand_re_n,
  output logic [NUM_CHIPS-1:0]    nand_wp_n,
  input  logic [NUM_CHIPS-1:0]    nand_rb_n,
  input  logic [NUM_CHIPS-1:0]    nand_rb2_n,
  // status for debug
  output logic [1:0]              enc_state,
  output logic [2:0]              dec_state,
  output logic [5:0]              nand_state    [NUM_CHIPS]
);

  aes_encrypt_plb u_aes_enc (
    .Bus2IP_Clk(clk), .Bus2IP_Reset(rst),
    .Bus2IP_Data(enc_Bus2IP_Data), .Bus2IP_BE(enc_Bus2IP_BE),
    .Bus2IP_RdCE(enc_Bus2IP_RdCE), .Bus2IP_WrCE(enc_Bus2IP_WrCE),
    .IP2Bus_Data(enc_IP2Bus_Data), .IP2Bus_RdAck(enc_IP2Bus_RdAck),
    .IP2Bus_WrAck(enc_IP2Bus_WrAck), .IP2Bus_Error(enc_IP2Bus_Error),
    .fsm_state(enc_state)
  );

  aes_decrypt_plb u_aes_dec (
    .Bus2IP_Clk(clk), .Bus2IP_Reset(rst),
    .Bus2IP_Data(dec_Bus2IP_Data), .Bus2IP_BE(dec_Bus2IP_BE),
    .Bus2IP_RdCE(dec_Bus2IP_RdCE), .Bus2IP_WrCE(dec_Bus2IP_WrCE),
    .IP2Bus_Data(dec_IP2Bus_Data), .IP2Bus_RdAck(dec_IP2Bus_RdAck),
    .IP2Bus_WrAck(dec_IP2Bus_WrAck), .IP2Bus_Error(dec_IP2Bus_Error),
    .fsm_state(dec_state)
  );

  for (genvar c = 0; c < NUM_CHIPS; c++) begin : g_chip
    nand_fsl u_nand (
      .FSL_Clk(clk), .FSL_Rst(rst),
      .FSL_S_Data(fsl_s_data[c]), .FSL_S_Control(fsl_s_control[c]),
      .FSL_S_Exists(fsl_s_exists[c]), .FSL_S_Read(fsl_s_read[c]),
      .FSL_M_Data(fsl_m_data[c]), .FSL_M_Control(fsl_m_control[c]),
      .FSL_M_Write(fsl_m_write[c]), .FSL_M_Full(fsl_m_full[c]),
      .n_io_o(nand_io_o[c]), .n_io_i(nand_io_i[c]), .n_io_dir(nand_io_dir[c]),
      .n_ce1_l(nand_ce_n[c]), .n_ce2_l(nand_ce2_n[c]), .n_cle(nand_cle[c]),
      .n_ale(nand_ale[c]), .n_we_l(nand_we_n[c]), .n_re_l(nand_re_n[c]),
      .n_wp_l(nand_wp_n[c]), .n_rb1_I(nand_rb_n[c]), .n_rb2_I(nand_rb2_n[c]),
      .curr_state(nand_state[c]),
      .count_q(), .nCmd(), .nAddr(), .nCmd_Loaded(), .nData_Loaded(), .nDone(),
      .nData_Done(), .nRB(), .nCtl_State()
    );
  end

endmodule
