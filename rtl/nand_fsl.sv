// nand_fsl: Fast Simplex Link (FSL) peripheral that connects the processor to
// one NAND flash package through a nand_controller.
//
// The processor sends commands as words on the FSL slave channel and receives
// read data and a completion word on the FSL master channel, so firmware needs
// no knowledge of the flash bus timing. A peripheral FSM translates between
// the word stream and the controller's byte handshake.
//
// Request (processor to peripheral, FSL slave side):
//   word 0, FSL_S_Control = 1 : header, bits [2:0] command (wmx_pkg::nand_cmd_e),
//                               bits [28:16] byte count
//   word 1                    : flash address (see nand_controller)
//   PROGRAM PAGE only         : ceil(count/4) data words, page byte 4k+j in
//                               bits [8j+7:8j] of word k
// A data word arriving while the peripheral waits for a header is discarded,
// which lets the stream resynchronise on the control bit.
// Response (peripheral to processor, FSL master side):
//   READ PAGE only            : ceil(count/4) data words, packed as above,
//                               unused bytes of the last word zero
//   always, FSL_M_Control = 1 : completion word, bits [7:0] flash status,
//                               bits [10:8] command
// The peripheral holds while FSL_M_Full is high and while FSL_S_Exists is low.
//
// The port names follow the peripheral's symbol (nand_fsl_02); flash I/O is
// split into n_io_o / n_io_i with the direction on n_io_dir (high = towards
// the flash) for the level-shifting CPLD, and n_wp_l is added for WP#. The
// word formats are this design's choice: the description gives the
// peripheral's purpose, not its message format. The FSL clock is also the
// controller clock.
module nand_fsl
  import wmx_pkg::*;
#(
  parameter int unsigned COL_BITS = 13,
  parameter int unsigned ROW_BITS = 18,
  parameter int unsigned T_WP  = 5,
  parameter int unsigned T_WH  = 5,
  parameter int unsigned T_RP  = 5,
  parameter int unsigned T_REH = 5,
  parameter int unsigned T_WB  = 20,
  parameter int unsigned T_WHR = 12,
  parameter int unsigned T_ADL = 20
) (
  input  logic        FSL_Clk,
  input  logic        FSL_Rst,
  // FSL slave channel (from the processor)
  input  logic [31:0] FSL_S_Data,
  input  logic        FSL_S_Control,
  input  logic        FSL_S_Exists,
  output logic        FSL_S_Read,
  // FSL master channel (to the processor)
  output logic [31:0] FSL_M_Data,
  output logic        FSL_M_Control,
  output logic        FSL_M_Write,
  input  logic        FSL_M_Full,
  // flash pins
  output logic [7:0]  n_io_o,
  input  logic [7:0]  n_io_i,
  output logic        n_io_dir,
  output logic        n_ce1_l,
  output logic        n_ce2_l,
  output logic        n_cle,
  output logic        n_ale,
  output logic        n_we_l,
  output logic        n_re_l,
  output logic        n_wp_l,
  input  logic        n_rb1_I,
  input  logic        n_rb2_I,
  // debug
  output logic [5:0]  curr_state,
  output logic [15:0] count_q,
  output logic [2:0]  nCmd,
  output logic [31:0] nAddr,
  output logic        nCmd_Loaded,
  output logic        nData_Loaded,
  output logic        nDone,
  output logic        nData_Done,
  output logic        nRB,
  output logic [6:0]  nCtl_State
);

  typedef enum logic [5:0] {
    P_IDLE         = 6'd0,
    P_ADDR         = 6'd1,
    P_ISSUE        = 6'd2,
    P_PROG_FETCH   = 6'd3,
    P_PROG_FEED    = 6'd4,
    P_READ_COLLECT = 6'd5,
    P_READ_SEND    = 6'd6,
    P_WAIT_DONE    = 6'd7,
    P_REPLY        = 6'd8
  } per_state_e;

  per_state_e  state_q;
  nand_cmd_e   cmd_q;
  logic [12:0] len_q;
  logic [31:0] addr_q, word_q;
  logic [12:0] idx_q;        // bytes transferred so far
  logic        done_seen_q;

  // controller
  logic [7:0]  c_data_in, c_data_out, c_status;
  logic        c_data_ready, c_data_done, c_rb;
  logic [6:0]  c_state;
  logic [1:0]  slot;
  logic        last_byte;

  nand_controller #(
    .COL_BITS(COL_BITS), .ROW_BITS(ROW_BITS), .T_WP(T_WP), .T_WH(T_WH), .T_RP(T_RP),
    .T_REH(T_REH), .T_WB(T_WB), .T_WHR(T_WHR), .T_ADL(T_ADL)
  ) u_ctl (
    .clk(FSL_Clk), .reset(FSL_Rst),
    .cmd(cmd_q), .addr(addr_q), .len(len_q), .cmd_loaded(nCmd_Loaded),
    .data_in(c_data_in), .data_loaded(nData_Loaded), .data_out(c_data_out),
    .data_ready(c_data_ready), .data_done(c_data_done), .done(nDone), .rb(c_rb),
    .status(c_status), .current_state_fsm(c_state),
    .io_o(n_io_o), .io_oe(n_io_dir), .io_i(n_io_i), .ce_n(n_ce1_l), .ce2_n(n_ce2_l),
    .cle(n_cle), .ale(n_ale), .we_n(n_we_l), .re_n(n_re_l), .wp_n(n_wp_l),
    .rb_n(n_rb1_I), .rb2_n(n_rb2_I)
  );

  assign slot      = idx_q[1:0];
  assign last_byte = (idx_q + 13'd1 == len_q);
  assign c_data_in = word_q[8*slot +: 8];

  always_ff @(posedge FSL_Clk) begin
    if (FSL_Rst) begin
      state_q     <= P_IDLE;
      cmd_q       <= NAND_NOP;
      len_q       <= '0;
      addr_q      <= '0;
      word_q      <= '0;
      idx_q       <= '0;
      done_seen_q <= 1'b0;
    end else begin
      if (nDone) done_seen_q <= 1'b1;
      unique case (state_q)
        P_IDLE: if (FSL_S_Exists && FSL_S_Control) begin
          cmd_q   <= nand_cmd_e'(FSL_S_Data[2:0]);
          len_q   <= FSL_S_Data[28:16];
          state_q <= P_ADDR;
        end
        P_ADDR: if (FSL_S_Exists) begin
          addr_q  <= FSL_S_Data;
          state_q <= P_ISSUE;
        end
        P_ISSUE: begin
          idx_q       <= '0;
          word_q      <= '0;
          done_seen_q <= 1'b0;
          if (cmd_q == NAND_PROGRAM_PAGE && len_q != 0)   state_q <= P_PROG_FETCH;
          else if (cmd_q == NAND_READ_PAGE && len_q != 0) state_q <= P_READ_COLLECT;
          else                                            state_q <= P_WAIT_DONE;
        end
        P_PROG_FETCH: if (FSL_S_Exists) begin
          word_q  <= FSL_S_Data;
          state_q <= P_PROG_FEED;
        end
        P_PROG_FEED: if (c_data_ready) begin
          idx_q <= idx_q + 13'd1;
          if (last_byte)         state_q <= P_WAIT_DONE;
          else if (slot == 2'd3) state_q <= P_PROG_FETCH;
        end
        P_READ_COLLECT: if (c_data_ready) begin
          word_q[8*slot +: 8] <= c_data_out;
          idx_q <= idx_q + 13'd1;
          if (last_byte || slot == 2'd3) state_q <= P_READ_SEND;
        end
        P_READ_SEND: if (!FSL_M_Full) begin
          word_q  <= '0;
          state_q <= (idx_q == len_q) ? P_WAIT_DONE : P_READ_COLLECT;
        end
        P_WAIT_DONE: if (done_seen_q || nDone) state_q <= P_REPLY;
        P_REPLY: if (!FSL_M_Full) state_q <= P_IDLE;
        default: state_q <= P_IDLE;
      endcase
    end
  end

  // FSL handshakes
  assign FSL_S_Read = FSL_S_Exists &&
                      ((state_q == P_IDLE) || (state_q == P_ADDR) || (state_q == P_PROG_FETCH));
  assign FSL_M_Write   = !FSL_M_Full && ((state_q == P_READ_SEND) || (state_q == P_REPLY));
  assign FSL_M_Control = (state_q == P_REPLY);
  assign FSL_M_Data    = (state_q == P_REPLY) ? {21'd0, cmd_q, c_status} : word_q;

  // controller handshakes
  assign nCmd_Loaded  = (state_q == P_ISSUE);
  assign nData_Loaded = c_data_ready && ((state_q == P_PROG_FEED) || (state_q == P_READ_COLLECT));

  assign curr_state = state_q;
  assign count_q    = 16'(idx_q);
  assign nCmd       = cmd_q;
  assign nAddr      = addr_q;
  assign nData_Done = c_data_done;
  assign nRB        = c_rb;
  assign nCtl_State = c_state;

endmodule
