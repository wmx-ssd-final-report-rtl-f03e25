// aes_plb_regs: the 14-register slave bank shared by the AES encryption and
// decryption PLB peripherals.
//
// Register map (32-bit words, index = one-hot chip-enable bit):
//   slv_reg0..3   key       key[31:0] in reg0 ... key[127:96] in reg3   (R/W)
//   slv_reg4..7   text_in   text[31:0] in reg4 ... text[127:96] in reg7 (R/W)
//   slv_reg8..11  text_out  result[31:0] in reg8 ... [127:96] in reg11 (R)
//   slv_reg12     reserved/debug scratch register                      (R/W)
//   slv_reg13     CTRL: written by software to start an operation and by
//                 the peripheral's FSM to report completion             (R/W)
// The map follows the peripheral block diagrams. The bus side is the user
// side of a PLB slave attachment as generated for user logic: one-hot read
// and write chip enables, byte enables, and acknowledges given in the same
// cycle as the enable. Writes honour Bus2IP_BE (bit i enables byte
// [8i+7:8i]). When the FSM writes CTRL in the same cycle as software, the
// FSM wins. Reads of slv_reg8..11 return the core's result wire directly.
module aes_plb_regs
  import wmx_pkg::*;
(
  input  logic                    Bus2IP_Clk,
  input  logic                    Bus2IP_Reset,
  input  logic [31:0]             Bus2IP_Data,
  input  logic [3:0]              Bus2IP_BE,
  input  logic [AES_NUM_REGS-1:0] Bus2IP_RdCE,
  input  logic [AES_NUM_REGS-1:0] Bus2IP_WrCE,
  output logic [31:0]             IP2Bus_Data,
  output logic                    IP2Bus_RdAck,
  output logic                    IP2Bus_WrAck,
  output logic                    IP2Bus_Error,
  // towards the core and the FSM
  output logic [127:0]            key,
  output logic [127:0]            text_in,
  input  logic [127:0]            text_out_wire,
  output logic [31:0]             ctrl,
  input  logic                    ctrl_hw_we,
  input  logic [31:0]             ctrl_hw_data
);

  logic [31:0] slv_reg [AES_NUM_REGS];

  function automatic logic [31:0] merge_be(input logic [31:0] old_v,
                                           input logic [31:0] new_v,
                                           input logic [3:0]  be);
    logic [31:0] r;
    for (int b = 0; b < 4; b++) r[8*b +: 8] = be[b] ? new_v[8*b +: 8] : old_v[8*b +: 8];
    return r;
  endfunction

  always_ff @(posedge Bus2IP_Clk) begin
    if (Bus2IP_Reset) begin
      for (int i = 0; i < AES_NUM_REGS; i++) slv_reg[i] <= '0;
    end else begin
      for (int i = 0; i < AES_NUM_REGS; i++)
        if (Bus2IP_WrCE[i] && !(i >= 8 && i <= 11))
          slv_reg[i] <= merge_be(slv_reg[i], Bus2IP_Data, Bus2IP_BE);
      if (ctrl_hw_we) slv_reg[13] <= ctrl_hw_data;
    end
  end

  assign key     = {slv_reg[3], slv_reg[2], slv_reg[1], slv_reg[0]};
  assign text_in = {slv_reg[7], slv_reg[6], slv_reg[5], slv_reg[4]};
  assign ctrl    = slv_reg[13];

  always_comb begin
    IP2Bus_Data = '0;
    for (int i = 0; i < AES_NUM_REGS; i++) begin
      if (Bus2IP_RdCE[i]) begin
        if (i >= 8 && i <= 11) IP2Bus_Data = text_out_wire[32*(i-8) +: 32];
        else                   IP2Bus_Data = slv_reg[i];
      end
    end
  end

  assign IP2Bus_RdAck = |Bus2IP_RdCE;
  assign IP2Bus_WrAck = |Bus2IP_WrCE;
  assign IP2Bus_Error = 1'b0;

endmodule
