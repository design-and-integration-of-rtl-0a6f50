// nand_flash_model: behavioural model of an 8-bit asynchronous SLC NAND flash
// for the testbenches (not synthesizable, not part of the controller).
//
// It samples the pins on the testbench clock, which is the controller's clock,
// so every edge the controller drives is seen one clock later. On a WE_n rising
// edge with CE_n low it latches a command (CLE high), an address byte (ALE
// high) or a data byte. RE_n falling puts the next output byte on io_o.
// Supported commands: FFh reset, 80h/10h page program, 00h/30h page read,
// 60h/D0h block erase, 70h read status, 90h read ID. Programming can only
// clear bits (the stored byte is ANDed with the new one), erased bytes read
// FFh, and an erase clears PAGES_PER_BLOCK pages. Address order: two column
// cycles then three row cycles; erase takes three row cycles. R/B goes low for
// BUSY_CYCLES clocks after 10h, 30h, D0h and FFh, and for PWRUP_CYCLES clocks
// after power-up. Setting fail_next makes the next program or erase report
// failure in status bit 0 (FFh clears it). Status: bit 7 = not write
// protected, bits 6 and 5 = ready, bit 0 = fail. After 70h every RE_n pulse
// returns the status byte until another command arrives.
//
// It also checks the controller: `violations` counts a command other than 70h
// or FFh given while busy, a WE_n low pulse shorter than MIN_WP clocks, a RE_n
// low pulse shorter than MIN_RP clocks, CLE and ALE high together at a latch
// edge, and a latch with no chip enable. It logs every command and address
// byte for the testbench to compare.
module nand_flash_model #(
  parameter int unsigned PAGE_BYTES      = 2048,
  parameter int unsigned PAGES_PER_BLOCK = 64,
  parameter int unsigned BUSY_CYCLES     = 200,
  parameter int unsigned PWRUP_CYCLES    = 50,
  parameter int unsigned MIN_WP          = 1,
  parameter int unsigned MIN_RP          = 1,
  parameter logic [31:0] ID_BYTES        = 32'h9590_DA2C  // first byte in [7:0]
) (
  input  logic       clk,
  input  logic       ce_n,
  input  logic       cle,
  input  logic       ale,
  input  logic       we_n,
  input  logic       re_n,
  input  logic [7:0] io_i,
  output logic [7:0] io_o,
  output logic       rb
);

  typedef enum {M_IDLE, M_PROG_ADDR, M_PROG_DATA, M_READ_ADDR, M_READ_DATA,
                M_ERASE_ADDR, M_STATUS, M_ID_ADDR, M_ID} mode_e;

  logic [7:0]  mem [longint];
  logic [7:0]  buffer [PAGE_BYTES + 64];
  mode_e       mode = M_IDLE;
  logic [23:0] row = '0;
  logic [15:0] col = '0;
  int unsigned addr_cnt = 0;
  int unsigned ptr = 0;
  int unsigned busy_cnt = PWRUP_CYCLES;
  logic        fail = 1'b0;
  bit          fail_next = 0;
  logic        we_q = 1'b1, re_q = 1'b1;
  int unsigned we_low = 0, re_low = 0;

  // logs and counters for the testbench
  logic [7:0]  cmd_log [$];
  logic [7:0]  addr_log [$];
  int unsigned violations = 0;
  int unsigned n_prog = 0, n_read = 0, n_erase = 0, n_reset = 0, n_status = 0, n_id = 0;
  int unsigned data_in = 0, data_out = 0;

  initial begin
    io_o = 8'h00;
    rb   = 1'b0;
  end

  function automatic longint key(logic [23:0] r, int unsigned c);
    return (longint'(r) << 16) | longint'(c);
  endfunction

  function automatic logic [7:0] rd_mem(logic [23:0] r, int unsigned c);
    longint k = key(r, c);
    return mem.exists(k) ? mem[k] : 8'hFF;
  endfunction

  task automatic violation(string what);
    violations++;
    $display("%m: protocol violation at %0t: %s", $time, what);
  endtask

  task automatic go_busy();
    busy_cnt = BUSY_CYCLES;
    rb       = 1'b0;
  endtask

  task automatic do_command(logic [7:0] c);
    cmd_log.push_back(c);
    if (rb == 1'b0 && c != 8'h70 && c != 8'hFF) violation($sformatf("command %02h while busy", c));
    unique case (c)
      8'hFF: begin mode = M_IDLE; fail = 1'b0; n_reset++; go_busy(); end
      8'h80: begin
        mode = M_PROG_ADDR; addr_cnt = 0; col = '0; row = '0;
        foreach (buffer[i]) buffer[i] = 8'hFF;
      end
      8'h10: begin
        if (mode != M_PROG_DATA && mode != M_PROG_ADDR) violation("10h without 80h");
        for (int i = 0; i < PAGE_BYTES + 64; i++)
          if (buffer[i] != 8'hFF) mem[key(row, i)] = rd_mem(row, i) & buffer[i];
        fail = fail_next; fail_next = 0;
        n_prog++; mode = M_IDLE; go_busy();
      end
      8'h00: begin mode = M_READ_ADDR; addr_cnt = 0; col = '0; row = '0; end
      8'h30: begin
        if (mode != M_READ_ADDR) violation("30h without 00h");
        ptr = col; n_read++; mode = M_READ_DATA; go_busy();
      end
      8'h60: begin mode = M_ERASE_ADDR; addr_cnt = 0; row = '0; end
      8'hD0: begin
        if (mode != M_ERASE_ADDR) violation("D0h without 60h");
        begin
          logic [23:0] first = row & ~24'(PAGES_PER_BLOCK - 1);
          for (int p = 0; p < PAGES_PER_BLOCK; p++)
            for (int i = 0; i < PAGE_BYTES + 64; i++)
              if (mem.exists(key(first + 24'(p), i))) mem.delete(key(first + 24'(p), i));
        end
        fail = fail_next; fail_next = 0;
        n_erase++; mode = M_IDLE; go_busy();
      end
      8'h70: begin mode = M_STATUS; n_status++; end
      8'h90: begin mode = M_ID_ADDR; n_id++; end
      default: violation($sformatf("unknown command %02h", c));
    endcase
  endtask

  task automatic do_address(logic [7:0] a);
    addr_log.push_back(a);
    unique case (mode)
      M_PROG_ADDR, M_READ_ADDR: begin
        unique case (addr_cnt)
          0: col[7:0]    = a;
          1: col[15:8]   = a;
          2: row[7:0]    = a;
          3: row[15:8]   = a;
          4: row[23:16]  = a;
          default: violation("too many address cycles");
        endcase
        addr_cnt++;
        if (mode == M_PROG_ADDR && addr_cnt == 5) begin mode = M_PROG_DATA; ptr = col; end
      end
      M_ERASE_ADDR: begin
        unique case (addr_cnt)
          0: row[7:0]   = a;
          1: row[15:8]  = a;
          2: row[23:16] = a;
          default: violation("too many address cycles");
        endcase
        addr_cnt++;
      end
      M_ID_ADDR: begin mode = M_ID; ptr = 0; end
      default: violation("address byte outside a command");
    endcase
  endtask

  always @(posedge clk) begin
    // busy timer
    if (busy_cnt != 0) begin
      busy_cnt--;
      if (busy_cnt == 0) rb = 1'b1;
    end
    // pulse-width measurement
    if (!we_n) we_low++;
    if (!re_n) re_low++;
    // WE_n rising edge: latch
    if (we_n && !we_q) begin
      if (we_low < MIN_WP) violation("WE_n pulse too short");
      if (ce_n) violation("latch with CE_n high");
      else if (cle && ale) violation("CLE and ALE both high");
      else if (cle) do_command(io_i);
      else if (ale) do_address(io_i);
      else if (mode == M_PROG_DATA) begin
        if (ptr < PAGE_BYTES + 64) buffer[ptr] = io_i;
        ptr++; data_in++;
      end else violation("data byte outside a program");
    end
    if (we_n) we_low = 0;
    // RE_n falling edge: drive the next byte
    if (!re_n && re_q) begin
      if (ce_n) violation("read with CE_n high");
      unique case (mode)
        M_STATUS:    io_o <= {1'b1, rb, rb, 4'b0000, fail};
        M_ID:        begin io_o <= ID_BYTES[8*(ptr%4) +: 8]; ptr++; end
        M_READ_DATA: begin io_o <= rd_mem(row, ptr); ptr++; data_out++; end
        default:     begin io_o <= 8'h00; violation("read with nothing to output"); end
      endcase
    end
    if (re_n && !re_q && re_low < MIN_RP) violation("RE_n pulse too short");
    if (re_n) re_low = 0;
    we_q = we_n;
    re_q = re_n;
  end

endmodule
