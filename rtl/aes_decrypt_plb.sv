// aes_decrypt_plb: PLB peripheral that lets the processor load a decryption
// key and then decrypt 128-bit blocks under it.
//
// Key load: software writes the key into slv_reg0..3 and KEY_LOAD_READY into
// CTRL (slv_reg13). The FSM goes START_STATE -> KEYLOAD_STATE_1 (key_load_wire
// high for one cycle) -> KEYLOAD_STATE_2, waits there for the core's
// key_done_wire, writes KEY_LOAD_DONE into CTRL and returns to START_STATE.
// Block decryption: software writes the ciphertext into slv_reg4..7 and
// TEXT_LOAD_READY into CTRL. The FSM goes START_STATE -> ENCRYPT_STATE_1
// (text_load_wire high for one cycle) -> ENCRYPT_STATE_2, waits for
// text_done_wire, writes TEXT_OUT_DONE into CTRL and returns. Software then
// reads the plaintext from slv_reg8..11. Each phase takes 12 cycles in the
// core, so one key load plus one block is 24 core cycles; later blocks under
// the same key need only the 12-cycle text phase.
//
// The register map, state names and transitions follow the decryption block
// diagram (including its state name ENCRYPT_STATE for the text phase). The
// numeric CTRL codes are not given there and are defined in wmx_pkg.
module aes_decrypt_plb
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
  output logic [2:0]              fsm_state      // debug: current FSM state
);

  typedef enum logic [2:0] {
    START_STATE     = 3'd0,
    KEYLOAD_STATE_1 = 3'd1,
    KEYLOAD_STATE_2 = 3'd2,
    ENCRYPT_STATE_1 = 3'd3,
    ENCRYPT_STATE_2 = 3'd4
  } dec_state_e;

  dec_state_e   state_q;
  logic         key_load_wire, text_load_wire, key_done_wire, text_done_wire;
  logic [127:0] key, text_in, text_out_wire;
  logic [31:0]  ctrl, ctrl_hw_data;
  logic         ctrl_hw_we;

  aes_plb_regs u_regs (
    .Bus2IP_Clk, .Bus2IP_Reset, .Bus2IP_Data, .Bus2IP_BE, .Bus2IP_RdCE, .Bus2IP_WrCE,
    .IP2Bus_Data, .IP2Bus_RdAck, .IP2Bus_WrAck, .IP2Bus_Error,
    .key, .text_in, .text_out_wire, .ctrl, .ctrl_hw_we, .ctrl_hw_data
  );

  aes_inv_cipher_top u_core (
    .clk(Bus2IP_Clk), .rst(Bus2IP_Reset), .kld(key_load_wire), .ld(text_load_wire),
    .key, .text_in, .text_out(text_out_wire), .kdone(key_done_wire), .done(text_done_wire)
  );

  always_ff @(posedge Bus2IP_Clk) begin
    if (Bus2IP_Reset) state_q <= START_STATE;
    else begin
      unique case (state_q)
        START_STATE:
          if (ctrl == CTRL_KEY_LOAD_READY)       state_q <= KEYLOAD_STATE_1;
          else if (ctrl == CTRL_TEXT_LOAD_READY) state_q <= ENCRYPT_STATE_1;
        KEYLOAD_STATE_1: state_q <= KEYLOAD_STATE_2;
        KEYLOAD_STATE_2: if (key_done_wire)  state_q <= START_STATE;
        ENCRYPT_STATE_1: state_q <= ENCRYPT_STATE_2;
        ENCRYPT_STATE_2: if (text_done_wire) state_q <= START_STATE;
        default:         state_q <= START_STATE;
      endcase
    end
  end

  assign key_load_wire  = (state_q == KEYLOAD_STATE_1);
  assign text_load_wire = (state_q == ENCRYPT_STATE_1);
  assign ctrl_hw_we     = (state_q == KEYLOAD_STATE_2 && key_done_wire) ||
                          (state_q == ENCRYPT_STATE_2 && text_done_wire);
  assign ctrl_hw_data   = (state_q == KEYLOAD_STATE_2) ? CTRL_KEY_LOAD_DONE : CTRL_TEXT_OUT_DONE;
  assign fsm_state      = state_q;

endmodule
