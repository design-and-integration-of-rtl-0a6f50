// tb_nfc_timing_fsm: self-checking testbench of the timing FSM.
//
// Issues command, address, write-data, read-data, tWB/R-B and tWHR requests
// with small pulse widths and checks, on the pins: which strobe latches which
// byte, that CLE/ALE/IO are set up T_SETUP clocks before WE_n falls and held
// while WE_n is low, the WE_n and RE_n low times, the byte returned by a read
// (the testbench plays the flash and changes the bus one clock after RE_n
// falls), and the clock counts of the two waits.
module tb_nfc_timing_fsm;
  import nfc_pkg::*;

  localparam int unsigned T_SETUP = 2, T_WP = 3, T_WH = 2, T_RP = 4, T_REH = 2,
                          T_WB = 6, T_WHR = 5;

  logic clk = 0, rst_n = 1;
  initial #2 rst_n = 0;
  always #5 clk = ~clk;

  logic       req_valid = 0, req_ready, done, cle, ale, we_n, re_n, io_oe, rb_sync;
  nfc_req_t   req;
  logic [7:0] rd_data, io_o, io_i = 8'h00;
  logic       rb = 1'b1;

  nfc_timing_fsm #(.T_SETUP(T_SETUP), .T_WP(T_WP), .T_WH(T_WH), .T_RP(T_RP),
                   .T_REH(T_REH), .T_WB(T_WB), .T_WHR(T_WHR)) dut (
    .clk, .rst_n, .req_valid, .req, .req_ready, .done, .rd_data,
    .nf_cle(cle), .nf_ale(ale), .nf_we_n(we_n), .nf_re_n(re_n), .nf_io_o(io_o),
    .nf_io_oe(io_oe), .nf_io_i(io_i), .nf_rb(rb), .rb_sync);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- pin monitor ----
  int unsigned we_low = 0, re_low = 0, setup = 0;
  logic we_q = 1, re_q = 1, cle_q, ale_q;
  logic [7:0] io_q;
  // latched events: {cle, ale, byte}
  logic [9:0] latched [$];
  int unsigned we_widths [$], re_widths [$], setups [$];

  always @(negedge clk) begin
    if (io_oe && we_n && we_q) setup++;
    if (!we_n) begin
      we_low++;
      if (we_q) begin setups.push_back(setup); cle_q = cle; ale_q = ale; io_q = io_o; end
      else if (cle != cle_q || ale != ale_q || io_o != io_q) begin
        checks++; failures++; $display("FAIL: CLE/ALE/IO changed while WE_n low");
      end
    end
    if (we_n && !we_q) begin
      latched.push_back({cle, ale, io_o});
      we_widths.push_back(we_low);
      if (!io_oe) begin checks++; failures++; $display("FAIL: I/O not driven at latch"); end
      we_low = 0;
    end
    if (!io_oe) setup = 0;
    if (!re_n) re_low++;
    if (!re_n && re_q) io_i <= 8'hA0 + 8'(re_widths.size());   // flash drives after tREA
    if (re_n && !re_q) begin re_widths.push_back(re_low); re_low = 0; end
    we_q = we_n;
    re_q = re_n;
  end

  // ---- request driver ----
  task automatic issue(nfc_cyc_e k, logic [7:0] d, output int unsigned cycles);
    #1 req = '{kind: k, data: d};
    req_valid = 1;
    while (!req_ready) begin @(posedge clk); #1; end
    @(posedge clk);          // the handshake edge
    #1 req_valid = 0;
    cycles = 0;
    while (!done) begin @(posedge clk); #1; cycles++; end
  endtask

  int unsigned cyc;

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk);
    #1;

    issue(CYC_CMD, 8'h80, cyc);
    check(cyc == T_SETUP + T_WP + T_WH, $sformatf("command cycle length %0d", cyc));
    issue(CYC_ADDR, 8'h09, cyc);
    issue(CYC_WDATA, 8'h34, cyc);
    issue(CYC_CMD, 8'h10, cyc);
    @(posedge clk);
    check(latched.size() == 4, "four latch edges");
    if (latched.size() == 4) begin
      check(latched[0] == {2'b10, 8'h80}, "command latched with CLE");
      check(latched[1] == {2'b01, 8'h09}, "address latched with ALE");
      check(latched[2] == {2'b00, 8'h34}, "data latched without CLE/ALE");
      check(latched[3] == {2'b10, 8'h10}, "second command latched with CLE");
    end
    foreach (we_widths[i]) check(we_widths[i] == T_WP, $sformatf("WE_n low %0d clocks", we_widths[i]));
    foreach (setups[i])    check(setups[i] == T_SETUP, $sformatf("setup %0d clocks", setups[i]));

    // reads: the testbench flash puts A0h, A1h on the bus
    issue(CYC_RDATA, 8'h00, cyc);
    check(rd_data == 8'hA0, $sformatf("read byte %02h", rd_data));
    check(cyc == T_RP + T_REH, $sformatf("read cycle length %0d", cyc));
    issue(CYC_RDATA, 8'h00, cyc);
    check(rd_data == 8'hA1, $sformatf("second read byte %02h", rd_data));
    foreach (re_widths[i]) check(re_widths[i] == T_RP, $sformatf("RE_n low %0d clocks", re_widths[i]));
    check(we_n && cle == 0 && ale == 0, "strobes idle after reads");

    // tWHR wait
    issue(CYC_WAIT_WHR, 8'h00, cyc);
    check(cyc == T_WHR, $sformatf("tWHR wait %0d clocks", cyc));

    // tWB, then R/B: flash goes busy 2 clocks in and ready 30 clocks later
    fork
      begin repeat (2) @(posedge clk); rb = 0; repeat (30) @(posedge clk); rb = 1; end
    join_none
    issue(CYC_WAIT_RB, 8'h00, cyc);
    check(cyc >= 32 && cyc <= 32 + 3, $sformatf("R/B wait ended after %0d clocks", cyc));

    // R/B already high: only tWB is spent (plus one clock to see R/B)
    issue(CYC_WAIT_RB, 8'h00, cyc);
    check(cyc == T_WB + 1, $sformatf("tWB-only wait %0d clocks", cyc));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
