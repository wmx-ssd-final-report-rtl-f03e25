// nand_bus_cycle: performs one timed NAND flash bus cycle for the NAND
// controller: a command latch, an address latch, a data write or a data read.
//
// start (one cycle, engine idle) captures the cycle kind and the byte. Write
// kinds drive CLE (command) or ALE (address), put the byte on the I/O bus,
// hold WE# low for T_WP clocks and high again for T_WH clocks; the flash
// latches the byte on the rising edge of WE#, and CLE/ALE/data stay valid
// through the high phase as hold time. A read holds RE# low for T_RP clocks,
// samples io_i in the last low clock and keeps RE# high for T_REH clocks. done
// pulses for one clock after the cycle; rbyte holds the byte read. All pin
// outputs are registered. Between cycles the engine releases the bus
// (io_oe low, CLE/ALE low, WE#/RE# high).
//
// The controller builds every command from these cycles, so the command
// latch sequence is shared by all commands. The pulse widths are parameters;
// their defaults (50 ns low, 50 ns high at a 100 MHz clock) are this design's
// choice for the slowest ONFI timing mode, which a flash uses after power-on.
module nand_bus_cycle
  import wmx_pkg::*;
#(
  parameter int unsigned T_WP  = 5,   // WE# low time, clocks
  parameter int unsigned T_WH  = 5,   // WE# high time, clocks
  parameter int unsigned T_RP  = 5,   // RE# low time, clocks
  parameter int unsigned T_REH = 5    // RE# high time, clocks
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        start,
  input  nand_cycle_e kind,
  input  logic [7:0]  wbyte,
  output logic        busy,
  output logic        done,
  output logic [7:0]  rbyte,
  // flash pins
  output logic        cle,
  output logic        ale,
  output logic        we_n,
  output logic        re_n,
  output logic [7:0]  io_o,
  output logic        io_oe,
  input  logic [7:0]  io_i
);

  typedef enum logic [1:0] {C_IDLE, C_LOW, C_HIGH} cyc_state_e;

  cyc_state_e  state_q;
  nand_cycle_e kind_q;
  logic [7:0]  cnt_q;

  assign busy = (state_q != C_IDLE);

  always_ff @(posedge clk) begin
    if (reset) begin
      state_q <= C_IDLE;
      kind_q  <= CYC_CMD;
      cnt_q   <= '0;
      done    <= 1'b0;
      rbyte   <= '0;
      cle     <= 1'b0;
      ale     <= 1'b0;
      we_n    <= 1'b1;
      re_n    <= 1'b1;
      io_o    <= '0;
      io_oe   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        C_IDLE: begin
          cle   <= 1'b0;
          ale   <= 1'b0;
          io_oe <= 1'b0;
          if (start) begin
            kind_q <= kind;
            cle    <= (kind == CYC_CMD);
            ale    <= (kind == CYC_ADDR);
            io_o   <= wbyte;
            io_oe  <= (kind != CYC_RDATA);
            if (kind == CYC_RDATA) begin
              re_n  <= 1'b0;
              cnt_q <= 8'(T_RP - 1);
            end else begin
              we_n  <= 1'b0;
              cnt_q <= 8'(T_WP - 1);
            end
            state_q <= C_LOW;
          end
        end
        C_LOW: begin
          if (cnt_q == 0) begin
            we_n <= 1'b1;
            re_n <= 1'b1;
            if (kind_q == CYC_RDATA) begin
              rbyte <= io_i;
              cnt_q <= 8'(T_REH - 1);
            end else begin
              cnt_q <= 8'(T_WH - 1);
            end
            state_q <= C_HIGH;
          end else begin
            cnt_q <= cnt_q - 8'd1;
          end
        end
        C_HIGH: begin
          if (cnt_q == 0) begin
            done    <= 1'b1;
            state_q <= C_IDLE;
            cle     <= 1'b0;
            ale     <= 1'b0;
            io_oe   <= 1'b0;
          end else begin
            cnt_q <= cnt_q - 8'd1;
          end
        end
        default: state_q <= C_IDLE;
      endcase
    end
  end

  a_start_when_idle : assert property (@(posedge clk) disable iff (reset)
                                        start |-> state_q == C_IDLE)
    else $error("nand_bus_cycle: start while a cycle is in progress");

endmodule
