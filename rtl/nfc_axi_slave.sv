// nfc_axi_slave: AXI4 slave interface of the NAND flash controller.
//
// One write and one read channel pair, each handling one burst at a time.
// Every beat of a burst addresses the same location (the burst address is not
// incremented), which suits both the registers and the data window.
//
// Register bursts: each write beat is passed to the register block
// (reg_wr_*); each read beat returns reg_rd_data for the burst address. A
// refused command write (an operation is running) answers SLVERR.
//
// Data window (REG_DATA): one byte per beat, in bits [7:0] of the data bus.
//   - A write burst when the controller is idle starts a page program
//     (prog_req); its beats stream to the main FSM (st_wr_*) and become flash
//     data cycles. A page may span several bursts: further write bursts are
//     accepted while the program waits for data. A burst whose last beat does
//     not complete the page is answered OKAY as soon as the main FSM asks for
//     the next byte; the burst that completes the page is answered only after
//     the flash has finished (10h, R/B, read status), with SLVERR if status
//     bit 0 reported a failure. Beats beyond the page length are dropped and
//     answered SLVERR.
//   - A read burst when the controller is idle starts a page read (read_req);
//     bytes from the main FSM (st_rd_*) are returned as beats, zero-extended.
//     Later read bursts continue the same page until its length is read.
//     Beats asked for after the page has ended return 0 with SLVERR.
//   - A data-window burst that arrives while another kind of operation runs
//     waits (awready / arready low) until the controller is idle.
// Starts are arbitrated: a program start or a command-register write holds off
// a read start in the same clock.
// Byte-per-beat data and the 0x0C data window match the controller's
// simulation traces; the rest of the protocol handling is this design's own.
module nfc_axi_slave
  import nfc_pkg::*;
#(
  parameter int unsigned ID_W   = 4,
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned DATA_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  // AXI4 write address
  input  logic [ID_W-1:0]   s_axi_awid,
  input  logic [ADDR_W-1:0] s_axi_awaddr,
  input  logic [7:0]        s_axi_awlen,
  input  logic [2:0]        s_axi_awsize,
  input  logic [1:0]        s_axi_awburst,
  input  logic              s_axi_awvalid,
  output logic              s_axi_awready,
  // AXI4 write data
  input  logic [DATA_W-1:0]   s_axi_wdata,
  input  logic [DATA_W/8-1:0] s_axi_wstrb,
  input  logic              s_axi_wlast,
  input  logic              s_axi_wvalid,
  output logic              s_axi_wready,
  // AXI4 write response
  output logic [ID_W-1:0]   s_axi_bid,
  output logic [1:0]        s_axi_bresp,
  output logic              s_axi_bvalid,
  input  logic              s_axi_bready,
  // AXI4 read address
  input  logic [ID_W-1:0]   s_axi_arid,
  input  logic [ADDR_W-1:0] s_axi_araddr,
  input  logic [7:0]        s_axi_arlen,
  input  logic [2:0]        s_axi_arsize,
  input  logic [1:0]        s_axi_arburst,
  input  logic              s_axi_arvalid,
  output logic              s_axi_arready,
  // AXI4 read data
  output logic [ID_W-1:0]   s_axi_rid,
  output logic [DATA_W-1:0] s_axi_rdata,
  output logic [1:0]        s_axi_rresp,
  output logic              s_axi_rlast,
  output logic              s_axi_rvalid,
  input  logic              s_axi_rready,
  // register block
  output logic              reg_wr_en,
  output logic [4:0]        reg_wr_addr,
  output logic [31:0]       reg_wr_data,
  output logic [3:0]        reg_wr_strb,
  input  logic              reg_wr_err,
  output logic [4:0]        reg_rd_addr,
  input  logic [31:0]       reg_rd_data,
  output logic              prog_req,
  output logic              read_req,
  // main FSM state
  input  logic              busy,
  input  nfc_op_e           cur_op,
  input  logic              prog_need_data,
  input  logic              status_err,
  // page program stream
  output logic              st_wr_valid,
  output logic [7:0]        st_wr_data,
  input  logic              st_wr_ready,
  // page read stream
  input  logic              st_rd_valid,
  input  logic [7:0]        st_rd_data,
  output logic              st_rd_ready
);

  typedef enum logic [2:0] {W_IDLE, W_REG, W_DATA, W_FINAL, W_RESP} wstate_e;
  typedef enum logic [1:0] {R_IDLE, R_REG, R_DATA} rstate_e;

  wstate_e         wstate;
  rstate_e         rstate;
  logic [ID_W-1:0] wid_q, rid_q;
  logic [4:0]      waddr_q, raddr_q;
  logic            werr_q;
  logic [7:0]      rlen_q, rbeat_q;
  logic [31:0]     rreg_q;

  wire prog_running = busy && (cur_op == OP_PROG);
  wire read_running = busy && (cur_op == OP_READ);
  wire aw_is_data   = (s_axi_awaddr[4:0] == REG_DATA);
  wire ar_is_data   = (s_axi_araddr[4:0] == REG_DATA);

  // ---------------- write channel ----------------
  always_comb begin
    s_axi_awready = 1'b0;
    if (wstate == W_IDLE)
      s_axi_awready = aw_is_data ? (!busy || prog_running) : 1'b1;
  end

  wire aw_hs = s_axi_awvalid && s_axi_awready;
  assign prog_req = aw_hs && aw_is_data && !busy;

  wire w_drop = !prog_running;   // page already complete: drop the beat

  always_comb begin
    s_axi_wready = 1'b0;
    st_wr_valid  = 1'b0;
    unique case (wstate)
      W_REG:  s_axi_wready = 1'b1;
      W_DATA: begin
        s_axi_wready = w_drop || st_wr_ready;
        st_wr_valid  = s_axi_wvalid && !w_drop;
      end
      default: ;
    endcase
  end
  assign st_wr_data = s_axi_wdata[7:0];

  wire w_hs = s_axi_wvalid && s_axi_wready;

  assign reg_wr_en   = (wstate == W_REG) && s_axi_wvalid;
  assign reg_wr_addr = waddr_q;
  assign reg_wr_data = s_axi_wdata[31:0];
  assign reg_wr_strb = s_axi_wstrb[3:0];

  assign s_axi_bvalid = (wstate == W_RESP);
  assign s_axi_bid    = wid_q;
  assign s_axi_bresp  = werr_q ? AXI_SLVERR : AXI_OKAY;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wstate  <= W_IDLE;
      wid_q   <= '0;
      waddr_q <= '0;
      werr_q  <= 1'b0;
    end else begin
      unique case (wstate)
        W_IDLE: if (aw_hs) begin
          wid_q   <= s_axi_awid;
          waddr_q <= s_axi_awaddr[4:0];
          werr_q  <= 1'b0;
          wstate  <= aw_is_data ? W_DATA : W_REG;
        end
        W_REG: if (w_hs) begin
          if (reg_wr_err) werr_q <= 1'b1;
          if (s_axi_wlast) wstate <= W_RESP;
        end
        W_DATA: if (w_hs) begin
          if (w_drop) werr_q <= 1'b1;
          if (s_axi_wlast) wstate <= W_FINAL;
        end
        W_FINAL: begin
          if (!prog_running) begin
            if (status_err) werr_q <= 1'b1;
            wstate <= W_RESP;
          end else if (prog_need_data) begin
            wstate <= W_RESP;
          end
        end
        W_RESP: if (s_axi_bready) wstate <= W_IDLE;
        default: wstate <= W_IDLE;
      endcase
    end
  end

  // ---------------- read channel ----------------
  wire cmd_write_now = reg_wr_en && (reg_wr_addr == REG_CMD);

  always_comb begin
    s_axi_arready = 1'b0;
    if (rstate == R_IDLE)
      s_axi_arready = ar_is_data ? ((!busy && !prog_req && !cmd_write_now) || read_running)
                                 : 1'b1;
  end

  wire ar_hs = s_axi_arvalid && s_axi_arready;
  assign read_req = ar_hs && ar_is_data && !busy;

  // register value captured when the burst is accepted and after each beat
  assign reg_rd_addr = (rstate == R_IDLE) ? s_axi_araddr[4:0] : raddr_q;
  assign s_axi_rid   = rid_q;
  assign s_axi_rlast = (rbeat_q == rlen_q);

  always_comb begin
    s_axi_rvalid = 1'b0;
    s_axi_rdata  = '0;
    s_axi_rresp  = AXI_OKAY;
    st_rd_ready  = 1'b0;
    unique case (rstate)
      R_REG: begin
        s_axi_rvalid = 1'b1;
        s_axi_rdata  = DATA_W'(rreg_q);
      end
      R_DATA: begin
        if (read_running) begin
          s_axi_rvalid = st_rd_valid;
          s_axi_rdata  = DATA_W'(st_rd_data);
          st_rd_ready  = s_axi_rready;
        end else begin
          s_axi_rvalid = 1'b1;
          s_axi_rresp  = AXI_SLVERR;
        end
      end
      default: ;
    endcase
  end

  wire r_hs = s_axi_rvalid && s_axi_rready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rstate  <= R_IDLE;
      rid_q   <= '0;
      raddr_q <= '0;
      rlen_q  <= '0;
      rbeat_q <= '0;
      rreg_q  <= '0;
    end else begin
      unique case (rstate)
        R_IDLE: if (ar_hs) begin
          rid_q   <= s_axi_arid;
          raddr_q <= s_axi_araddr[4:0];
          rlen_q  <= s_axi_arlen;
          rbeat_q <= '0;
          rreg_q  <= reg_rd_data;
          rstate  <= ar_is_data ? R_DATA : R_REG;
        end
        R_REG, R_DATA: if (r_hs) begin
          rbeat_q <= rbeat_q + 1'b1;
          rreg_q  <= reg_rd_data;
          if (s_axi_rlast) rstate <= R_IDLE;
        end
        default: rstate <= R_IDLE;
      endcase
    end
  end

  // AXI4 rule: a response, once valid, holds until it is taken.
  a_b_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axi_bvalid && !s_axi_bready |=> s_axi_bvalid && $stable(s_axi_bresp));
  a_r_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axi_rvalid && !s_axi_rready |=> s_axi_rvalid && $stable(s_axi_rdata));

endmodule
