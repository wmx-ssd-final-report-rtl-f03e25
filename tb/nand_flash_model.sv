// nand_flash_model: behavioural model of one die of an SLC NAND flash with an
// 8-bit asynchronous interface, for simulation only.
//
// It latches commands (CLE), address bytes (ALE, two column then three row
// cycles) and data on the rising edge of WE# while CE# is low, and drives the
// I/O bus while CE# and RE# are low. Supported opcodes: FFh reset, 70h read
// status, 00h/30h read page, 80h/10h program page, 60h/D0h erase block.
// R/B# falls TWB_NS after the confirming WE# edge and rises after the array
// time (TR_NS, TPROG_NS, TBERS_NS, TRST_NS). Pages live in a sparse
// associative array; unwritten bytes read as FFh, a program can only clear
// bits, and an erase returns a block of PAGES_PER_BLOCK pages to FFh. Status
// byte: bit 7 = not write protected, bits 6/5 = ready, bit 0 = last program
// or erase failed (write protected).
//
// The model counts interface timing violations (WE#/RE# pulse widths,
// command to status read tWHR, address to data tADL, commands other than
// status/reset while busy) in `violations`, and counts completed resets,
// reads, programs and erases so testbenches can see what happened.
module nand_flash_model #(
  parameter int  PAGE_BYTES      = 4314,
  parameter int  PAGES_PER_BLOCK = 64,
  parameter real TWP_NS   = 50.0,
  parameter real TWH_NS   = 30.0,
  parameter real TRP_NS   = 50.0,
  parameter real TREH_NS  = 30.0,
  parameter real TWHR_NS  = 120.0,
  parameter real TADL_NS  = 70.0,
  parameter real TWB_NS   = 100.0,
  parameter real TR_NS    = 25000.0,
  parameter real TPROG_NS = 200000.0,
  parameter real TBERS_NS = 500000.0,
  parameter real TRST_NS  = 5000.0
) (
  input  logic       ce_n,
  input  logic       cle,
  input  logic       ale,
  input  logic       we_n,
  input  logic       re_n,
  input  logic       wp_n,
  input  logic [7:0] io_i,
  output logic [7:0] io_o,
  output logic       io_drive,
  output logic       rb_n
);

  typedef logic [7:0] page_t [PAGE_BYTES];
  typedef enum {OUT_DATA, OUT_STATUS} out_mode_e;
  typedef enum {OP_NONE, OP_READ, OP_PROG, OP_ERASE, OP_RST} op_e;

  page_t     mem [int];
  page_t     page_reg;
  out_mode_e out_mode = OUT_STATUS;
  op_e       setup_op = OP_NONE;
  op_e       busy_op  = OP_NONE;
  logic [7:0] addr_b [5];
  int        addr_idx = 0;
  int        col = 0;
  int        row = 0;
  logic      fail = 1'b0;
  real       busy_time;
  real       t_we_fall = 0, t_we_rise = 0, t_re_fall = 0, t_re_rise = 0;
  real       t_last_cmd = 0, t_last_addr = 0;
  bit        data_phase_started = 0;
  event      busy_ev;

  int violations = 0;
  int n_resets = 0, n_reads = 0, n_programs = 0, n_erases = 0, n_status = 0;

  initial rb_n = 1'b1;

  function automatic page_t blank_page();
    page_t p;
    foreach (p[i]) p[i] = 8'hFF;
    return p;
  endfunction

  initial page_reg = blank_page();

  function automatic void violation(input string what);
    violations++;
    $display("[%0t] nand_flash_model %m: timing violation: %s", $time, what);
  endfunction

  function automatic int addr_col();
    return int'({addr_b[1], addr_b[0]});
  endfunction

  function automatic int addr_row();
    return int'({addr_b[4], addr_b[3], addr_b[2]});
  endfunction

  // WE# pulse widths
  always @(negedge we_n) if (!ce_n) begin
    if ($realtime - t_we_rise < TWH_NS && t_we_rise > 0) violation("WE# high time");
    t_we_fall = $realtime;
  end

  always @(posedge we_n) if (!ce_n) begin
    t_we_rise = $realtime;
    if (t_we_rise - t_we_fall < TWP_NS) violation("WE# low time");
    if (cle) begin
      if (!rb_n && io_i != 8'h70 && io_i != 8'hFF) violation("command while busy");
      t_last_cmd = $realtime;
      unique case (io_i)
        8'hFF: begin busy_op = OP_RST; busy_time = TRST_NS; out_mode = OUT_STATUS; ->busy_ev; end
        8'h70: begin out_mode = OUT_STATUS; n_status++; end
        8'h00: begin setup_op = OP_READ; addr_idx = 0; end
        8'h30: if (setup_op == OP_READ) begin
                 busy_op = OP_READ; busy_time = TR_NS; ->busy_ev;
               end
        8'h80: begin
                 setup_op = OP_PROG; addr_idx = 0; page_reg = blank_page();
                 data_phase_started = 0;
               end
        8'h10: if (setup_op == OP_PROG) begin
                 busy_op = OP_PROG; busy_time = TPROG_NS; ->busy_ev;
               end
        8'h60: begin setup_op = OP_ERASE; addr_idx = 2; end
        8'hD0: if (setup_op == OP_ERASE) begin
                 busy_op = OP_ERASE; busy_time = TBERS_NS; ->busy_ev;
               end
        default: $display("[%0t] nand_flash_model: unsupported command %h", $time, io_i);
      endcase
    end else if (ale) begin
      t_last_addr = $realtime;
      if (addr_idx < 5) addr_b[addr_idx] = io_i;
      addr_idx++;
      if (addr_idx == 5) begin
        col = addr_col();
        row = addr_row();
      end
    end else if (setup_op == OP_PROG) begin
      if (!data_phase_started && $realtime - t_last_addr < TADL_NS) violation("tADL");
      data_phase_started = 1;
      if (col < PAGE_BYTES) page_reg[col] = io_i;
      col++;
    end
  end

  // Array operations
  always begin
    @(busy_ev);
    #(TWB_NS);
    rb_n = 1'b0;
    #(busy_time);
    unique case (busy_op)
      OP_RST: begin
        setup_op = OP_NONE; fail = 1'b0; n_resets++;
      end
      OP_READ: begin
        page_reg = mem.exists(row) ? mem[row] : blank_page();
        out_mode = OUT_DATA; n_reads++;
      end
      OP_PROG: begin
        if (!wp_n) fail = 1'b1;
        else begin
          page_t p;
          fail = 1'b0;
          p = mem.exists(row) ? mem[row] : blank_page();
          foreach (p[i]) p[i] = p[i] & page_reg[i];
          mem[row] = p;
        end
        setup_op = OP_NONE; n_programs++;
      end
      OP_ERASE: begin
        if (!wp_n) fail = 1'b1;
        else begin
          int first;
          fail = 1'b0;
          first = row - (row % PAGES_PER_BLOCK);
          for (int r = first; r < first + PAGES_PER_BLOCK; r++)
            if (mem.exists(r)) mem.delete(r);
        end
        setup_op = OP_NONE; n_erases++;
      end
      default: ;
    endcase
    busy_op = OP_NONE;
    rb_n = 1'b1;
  end

  // Reads
  always @(negedge re_n) if (!ce_n) begin
    if ($realtime - t_re_rise < TREH_NS && t_re_rise > 0) violation("RE# high time");
    if ($realtime - t_last_cmd < TWHR_NS) violation("tWHR");
    if (!rb_n && out_mode == OUT_DATA) violation("data read while busy");
    t_re_fall = $realtime;
  end

  always @(posedge re_n) if (!ce_n) begin
    t_re_rise = $realtime;
    if (t_re_rise - t_re_fall < TRP_NS) violation("RE# low time");
    if (out_mode == OUT_DATA) col++;
  end

  always_comb begin
    io_drive = !ce_n && !re_n;
    if (out_mode == OUT_STATUS)
      io_o = {wp_n, rb_n, rb_n, 4'b0000, fail};
    else
      io_o = (col < PAGE_BYTES) ? page_reg[col] : 8'hFF;
  end

endmodule
