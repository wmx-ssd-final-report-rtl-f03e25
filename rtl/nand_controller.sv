// nand_controller: finite-state machine that runs NAND flash commands on one
// flash package with two dies (chip enables CE# and CE2#, ready/busy lines
// R/B# and R/B2#).
//
// Host side: the host puts a command on cmd (see wmx_pkg::nand_cmd_e), a flash
// address on addr and a byte count on len, and pulses cmd_loaded while the
// controller is idle. Supported commands: RESET (FFh), READ STATUS (70h),
// READ PAGE (00h, 5 address cycles, 30h, wait, then len bytes out),
// PROGRAM PAGE (80h, 5 address cycles, len bytes in, 10h, wait, status) and
// ERASE BLOCK (60h, 3 row address cycles, D0h, wait, status). Program and
// erase end with an automatic READ STATUS, so status always holds the flash
// status byte of the last command that read it (bit 0 = fail, bit 6 = ready).
// done pulses for one clock when a command is complete.
//
// Data handshake: for PROGRAM PAGE the controller raises data_ready when it
// can take a byte; the host places it on data_in and raises data_loaded for a
// clock. For READ PAGE the controller raises data_ready with a byte on
// data_out and holds it until the host acknowledges with data_loaded.
// data_done pulses when the len-th byte has been transferred.
//
// Address layout: addr[COL_BITS-1:0] is the column (byte in page),
// addr[COL_BITS +: ROW_BITS] the row (page and block), and bit
// COL_BITS+ROW_BITS selects the die (0: CE#, 1: CE2#). Column bytes go out in
// two address cycles and the row in three, low byte first. rb reports the
// selected die's ready line after a two-flop synchronizer.
//
// Every command is built from the bus cycles of nand_bus_cycle, so the
// command latch sequence is shared by all commands. After the last WE# of a
// command that makes the flash busy the controller waits T_WB clocks before it
// looks at R/B#, waits for ready, and waits T_WHR clocks between a command and
// the first data read and T_ADL clocks between the last address and the first
// program data byte. WP# is held low during reset and high afterwards.
//
// The port list, the 13-bit len, the 32-bit address and the 7-bit state
// output follow the controller's port diagram; the command subset and the
// FSM structure follow its description. The command codes, the address
// layout, the handshake details, the automatic status read and the timing
// defaults (a 100 MHz clock and the slowest ONFI timing mode) are this
// design's choices.
module nand_controller
  import wmx_pkg::*;
#(
  parameter int unsigned COL_BITS = 13,  // column address bits (4 KB page plus spare)
  parameter int unsigned ROW_BITS = 18,  // row address bits (pages of one die)
  parameter int unsigned T_WP  = 5,
  parameter int unsigned T_WH  = 5,
  parameter int unsigned T_RP  = 5,
  parameter int unsigned T_REH = 5,
  parameter int unsigned T_WB  = 20,     // WE# high to R/B# valid, clocks
  parameter int unsigned T_WHR = 12,     // command to first data read, clocks
  parameter int unsigned T_ADL = 20      // last address to first data write, clocks
) (
  input  logic        clk,
  input  logic        reset,
  // host side
  input  logic [2:0]  cmd,
  input  logic [31:0] addr,
  input  logic [12:0] len,
  input  logic        cmd_loaded,
  input  logic [7:0]  data_in,
  input  logic        data_loaded,
  output logic [7:0]  data_out,
  output logic        data_ready,
  output logic        data_done,
  output logic        done,
  output logic        rb,
  output logic [7:0]  status,
  output logic [6:0]  current_state_fsm,
  // flash side
  output logic [7:0]  io_o,
  output logic        io_oe,
  input  logic [7:0]  io_i,
  output logic        ce_n,
  output logic        ce2_n,
  output logic        cle,
  output logic        ale,
  output logic        we_n,
  output logic        re_n,
  output logic        wp_n,
  input  logic        rb_n,
  input  logic        rb2_n
);

  localparam int unsigned DIE_BIT = COL_BITS + ROW_BITS;

  typedef enum logic [6:0] {
    ST_IDLE        = 7'd0,
    ST_CMD1        = 7'd1,
    ST_ADDR        = 7'd2,
    ST_ADL_WAIT    = 7'd3,
    ST_PROG_WAIT   = 7'd4,
    ST_PROG_WRITE  = 7'd5,
    ST_CMD2        = 7'd6,
    ST_WB_WAIT     = 7'd7,
    ST_RB_WAIT     = 7'd8,
    ST_STATUS_CMD  = 7'd9,
    ST_WHR_WAIT    = 7'd10,
    ST_STATUS_READ = 7'd11,
    ST_READ_BYTE   = 7'd12,
    ST_READ_HAND   = 7'd13,
    ST_FINISH      = 7'd14
  } ctl_state_e;

  ctl_state_e  state_q;
  nand_cmd_e   cmd_q;
  logic [39:0] addr_bytes_q;   // {row padded to 24 bits, column padded to 16 bits}
  logic        die_q;
  logic [12:0] len_q, count_q;
  logic [2:0]  acyc_q;         // address cycle index 0..4
  logic [7:0]  wait_q;
  logic        issued_q;       // bus cycle of the current state started
  logic [1:0]  rb_sync_q, rb2_sync_q;
  logic        sel_ready;

  // bus cycle engine
  logic        cyc_start, cyc_done, cyc_busy;
  nand_cycle_e cyc_kind;
  logic [7:0]  cyc_byte, cyc_rbyte;

  nand_bus_cycle #(.T_WP(T_WP), .T_WH(T_WH), .T_RP(T_RP), .T_REH(T_REH)) u_cycle (
    .clk, .reset, .start(cyc_start), .kind(cyc_kind), .wbyte(cyc_byte),
    .busy(cyc_busy), .done(cyc_done), .rbyte(cyc_rbyte),
    .cle, .ale, .we_n, .re_n, .io_o, .io_oe, .io_i
  );

  // ready/busy synchronizers
  always_ff @(posedge clk) begin
    if (reset) begin
      rb_sync_q  <= '0;
      rb2_sync_q <= '0;
    end else begin
      rb_sync_q  <= {rb_sync_q[0], rb_n};
      rb2_sync_q <= {rb2_sync_q[0], rb2_n};
    end
  end
  assign sel_ready = die_q ? rb2_sync_q[1] : rb_sync_q[1];
  assign rb        = sel_ready;

  // Opcodes of the first and second command cycle.
  function automatic logic [7:0] first_opcode(input nand_cmd_e c);
    unique case (c)
      NAND_RESET:        return OP_RESET;
      NAND_READ_STATUS:  return OP_STATUS;
      NAND_READ_PAGE:    return OP_READ_1;
      NAND_PROGRAM_PAGE: return OP_PROGRAM_1;
      NAND_ERASE_BLOCK:  return OP_ERASE_1;
      default:           return OP_STATUS;
    endcase
  endfunction

  function automatic logic [7:0] second_opcode(input nand_cmd_e c);
    unique case (c)
      NAND_READ_PAGE:    return OP_READ_2;
      NAND_PROGRAM_PAGE: return OP_PROGRAM_2;
      default:           return OP_ERASE_2;
    endcase
  endfunction

  // Bus cycle requested by the current state.
  always_comb begin
    cyc_kind = CYC_CMD;
    cyc_byte = '0;
    unique case (state_q)
      ST_CMD1:        begin cyc_kind = CYC_CMD;   cyc_byte = first_opcode(cmd_q); end
      ST_ADDR:        begin cyc_kind = CYC_ADDR;  cyc_byte = addr_bytes_q[8*acyc_q +: 8]; end
      ST_PROG_WRITE:  begin cyc_kind = CYC_WDATA; cyc_byte = data_out; end
      ST_CMD2:        begin cyc_kind = CYC_CMD;   cyc_byte = second_opcode(cmd_q); end
      ST_STATUS_CMD:  begin cyc_kind = CYC_CMD;   cyc_byte = OP_STATUS; end
      ST_STATUS_READ: cyc_kind = CYC_RDATA;
      ST_READ_BYTE:   cyc_kind = CYC_RDATA;
      default: ;
    endcase
  end

  logic bus_state;
  assign bus_state = (state_q == ST_CMD1) || (state_q == ST_ADDR) || (state_q == ST_PROG_WRITE) ||
                     (state_q == ST_CMD2) || (state_q == ST_STATUS_CMD) ||
                     (state_q == ST_STATUS_READ) || (state_q == ST_READ_BYTE);
  assign cyc_start = bus_state && !issued_q && !cyc_busy;

  logic step_done;     // the bus cycle of the current state has finished
  assign step_done = bus_state && issued_q && cyc_done;

  always_ff @(posedge clk) begin
    if (reset) begin
      state_q      <= ST_IDLE;
      cmd_q        <= NAND_NOP;
      addr_bytes_q <= '0;
      die_q        <= 1'b0;
      len_q        <= '0;
      count_q      <= '0;
      acyc_q       <= '0;
      wait_q       <= '0;
      issued_q     <= 1'b0;
      data_out     <= '0;
      status       <= '0;
      done         <= 1'b0;
      data_done    <= 1'b0;
      ce_n         <= 1'b1;
      ce2_n        <= 1'b1;
      wp_n         <= 1'b0;
    end else begin
      done      <= 1'b0;
      data_done <= 1'b0;
      wp_n      <= 1'b1;
      if (cyc_start) issued_q <= 1'b1;
      if (step_done) issued_q <= 1'b0;

      unique case (state_q)
        ST_IDLE: begin
          ce_n  <= 1'b1;
          ce2_n <= 1'b1;
          if (cmd_loaded && nand_cmd_e'(cmd) != NAND_NOP && cmd <= 3'(NAND_ERASE_BLOCK)) begin
            cmd_q        <= nand_cmd_e'(cmd);
            addr_bytes_q <= {24'(addr[COL_BITS +: ROW_BITS]), 16'(addr[COL_BITS-1:0])};
            die_q        <= addr[DIE_BIT];
            len_q        <= len;
            count_q      <= '0;
            acyc_q       <= (nand_cmd_e'(cmd) == NAND_ERASE_BLOCK) ? 3'd2 : 3'd0;
            ce_n         <= addr[DIE_BIT];
            ce2_n        <= !addr[DIE_BIT];
            state_q      <= ST_CMD1;
          end
        end
        ST_CMD1: if (step_done) begin
          unique case (cmd_q)
            NAND_RESET:       begin wait_q <= 8'(T_WB - 1);  state_q <= ST_WB_WAIT;  end
            NAND_READ_STATUS: begin wait_q <= 8'(T_WHR - 1); state_q <= ST_WHR_WAIT; end
            default:          state_q <= ST_ADDR;
          endcase
        end
        ST_ADDR: if (step_done) begin
          if (acyc_q == 3'd4) begin
            if (cmd_q == NAND_PROGRAM_PAGE) begin
              wait_q  <= 8'(T_ADL - 1);
              state_q <= ST_ADL_WAIT;
            end else begin
              state_q <= ST_CMD2;
            end
          end else begin
            acyc_q <= acyc_q + 3'd1;
          end
        end
        ST_ADL_WAIT: begin
          if (wait_q != 0) wait_q <= wait_q - 8'd1;
          else state_q <= (len_q == 0) ? ST_CMD2 : ST_PROG_WAIT;
        end
        ST_PROG_WAIT: if (data_loaded) begin
          data_out <= data_in;
          state_q  <= ST_PROG_WRITE;
        end
        ST_PROG_WRITE: if (step_done) begin
          if (count_q + 13'd1 == len_q) begin
            data_done <= 1'b1;
            state_q   <= ST_CMD2;
          end else begin
            state_q <= ST_PROG_WAIT;
          end
          count_q <= count_q + 13'd1;
        end
        ST_CMD2: if (step_done) begin
          wait_q  <= 8'(T_WB - 1);
          state_q <= ST_WB_WAIT;
        end
        ST_WB_WAIT: begin
          if (wait_q != 0) wait_q <= wait_q - 8'd1;
          else state_q <= ST_RB_WAIT;
        end
        ST_RB_WAIT: if (sel_ready) begin
          unique case (cmd_q)
            NAND_RESET: state_q <= ST_FINISH;
            NAND_READ_PAGE: begin
              wait_q  <= 8'(T_WHR - 1);
              state_q <= ST_WHR_WAIT;
            end
            default: state_q <= ST_STATUS_CMD;
          endcase
        end
        ST_STATUS_CMD: if (step_done) begin
          wait_q  <= 8'(T_WHR - 1);
          state_q <= ST_WHR_WAIT;
        end
        ST_WHR_WAIT: begin
          if (wait_q != 0) wait_q <= wait_q - 8'd1;
          else if (cmd_q == NAND_READ_PAGE) state_q <= (len_q == 0) ? ST_FINISH : ST_READ_BYTE;
          else state_q <= ST_STATUS_READ;
        end
        ST_STATUS_READ: if (step_done) begin
          status  <= cyc_rbyte;
          state_q <= ST_FINISH;
        end
        ST_READ_BYTE: if (step_done) begin
          data_out <= cyc_rbyte;
          state_q  <= ST_READ_HAND;
        end
        ST_READ_HAND: if (data_loaded) begin
          count_q <= count_q + 13'd1;
          if (count_q + 13'd1 == len_q) begin
            data_done <= 1'b1;
            state_q   <= ST_FINISH;
          end else begin
            state_q <= ST_READ_BYTE;
          end
        end
        ST_FINISH: begin
          done    <= 1'b1;
          ce_n    <= 1'b1;
          ce2_n   <= 1'b1;
          state_q <= ST_IDLE;
        end
        default: state_q <= ST_IDLE;
      endcase
    end
  end

  assign data_ready        = (state_q == ST_PROG_WAIT) || (state_q == ST_READ_HAND);
  assign current_state_fsm = state_q;

  a_cmd_when_idle : assert property (@(posedge clk) disable iff (reset)
                                      cmd_loaded |-> state_q == ST_IDLE)
    else $error("nand_controller: cmd_loaded while a command is running");
  a_one_die : assert property (@(posedge clk) disable iff (reset) !(!ce_n && !ce2_n))
    else $error("nand_controller: both dies enabled");

endmodule
