// aes_encrypt_plb: PLB peripheral that lets the processor encrypt one 128-bit
// block at a time.
//
// Software writes the key into slv_reg0..3 and the plaintext into
// slv_reg4..7, then writes 0x2 into CTRL (slv_reg13). A three-state FSM
// clocked by Bus2IP_Clk waits in START_STATE for CTRL == 0x2, spends one cycle
// in ENCRYPT_STATE_1 with the core's load input (KLD) high, then waits in
// ENCRYPT_STATE_2 for the core's done. On done it writes 0x1 into CTRL and
// returns to START_STATE; software polls CTRL for 0x1 and reads the
// ciphertext from slv_reg8..11. A block takes 12 cycles in the core, so CTRL
// reads 0x1 on the 15th rising edge after the edge that wrote 0x2 (one edge to
// leave START_STATE, one to load the core, twelve in the core, one to write
// CTRL back).
//
// The register map, the state names, the start/done codes and the state
// transitions follow the encryption block diagram. The bus attachment (see
// aes_plb_regs) and the CTRL write-back by the FSM are this design's reading
// of "control bits used by the hardware to signal the firmware".
module aes_encrypt_plb
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
  output logic [1:0]              fsm_state      // debug: current FSM state
);

  typedef enum logic [1:0] {
    START_STATE     = 2'b00,
    ENCRYPT_STATE_1 = 2'b01,
    ENCRYPT_STATE_2 = 2'b10
  } enc_state_e;

  enc_state_e   state_q;
  logic         kld, done_wire;
  logic [127:0] key, text_in, text_out_wire;
  logic [31:0]  ctrl;
  logic         ctrl_hw_we;

  aes_plb_regs u_regs (
    .Bus2IP_Clk, .Bus2IP_Reset, .Bus2IP_Data, .Bus2IP_BE, .Bus2IP_RdCE, .Bus2IP_WrCE,
    .IP2Bus_Data, .IP2Bus_RdAck, .IP2Bus_WrAck, .IP2Bus_Error,
    .key, .text_in, .text_out_wire, .ctrl,
    .ctrl_hw_we, .ctrl_hw_data(CTRL_ENC_DONE)
  );

  aes_cipher_top u_core (
    .clk(Bus2IP_Clk), .rst(Bus2IP_Reset), .ld(kld), .key, .text_in,
    .text_out(text_out_wire), .done(done_wire)
  );

  always_ff @(posedge Bus2IP_Clk) begin
    if (Bus2IP_Reset) state_q <= START_STATE;
    else begin
      unique case (state_q)
        START_STATE:     if (ctrl == CTRL_ENC_START) state_q <= ENCRYPT_STATE_1;
        ENCRYPT_STATE_1: state_q <= ENCRYPT_STATE_2;
        ENCRYPT_STATE_2: if (done_wire) state_q <= START_STATE;
        default:         state_q <= START_STATE;
      endcase
    end
  end

  assign kld        = (state_q == ENCRYPT_STATE_1);
  assign ctrl_hw_we = (state_q == ENCRYPT_STATE_2) && done_wire;
  assign fsm_state  = state_q;

endmodule
