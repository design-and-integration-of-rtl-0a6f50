// nfc_timing_fsm: the timing FSM of the NAND flash controller.
//
// It performs one flash bus cycle at a time on the 8-bit NAND interface. The
// main FSM offers a request {kind, data}; the timing FSM takes it when idle
// (req_ready), generates the pin activity with the programmed pulse widths,
// and pulses `done` for one clock when the cycle is over. A read cycle returns
// the byte sampled from the flash on `rd_data`, valid together with `done`.
//
//   CYC_CMD / CYC_ADDR / CYC_WDATA : CLE (command) or ALE (address) and the
//       byte are driven for T_SETUP clocks, WE_n is low for T_WP clocks and
//       high again for T_WH clocks while CLE/ALE and the byte are still held,
//       so the flash latches the byte on the WE_n rising edge.
//   CYC_RDATA : RE_n is low for T_RP clocks; the I/O bus is sampled on the
//       clock edge that raises RE_n, then RE_n stays high for T_REH clocks.
//   CYC_WAIT_RB : waits T_WB clocks (tWB, WE_n high to R/B low), then waits
//       until the synchronised R/B input reads 1 (ready).
//   CYC_WAIT_WHR : waits T_WHR clocks (tWHR, WE_n high to RE_n low).
//
// CLE and ALE are active high, as on ONFI parts: command with CLE high and ALE
// low, address with ALE high and CLE low. All pin outputs come straight from
// flip-flops. R/B passes a two-flop synchroniser (rb_sync). The controller
// spends T_SETUP+T_WP+T_WH+1 clocks per write cycle and T_RP+T_REH+1 per read.
// The pulse widths are not given numerically for the controller; the defaults
// are asynchronous timing mode 0 values of common 8-bit SLC parts, counted at
// the 250 MHz system clock (4 ns): tCLS/tALS 50 ns, tWP 50 ns, tWH 30 ns,
// tRP 50 ns, tREH 30 ns, tWB 200 ns, tWHR 120 ns.
module nfc_timing_fsm
  import nfc_pkg::*;
#(
  parameter int unsigned T_SETUP = 13,
  parameter int unsigned T_WP    = 13,
  parameter int unsigned T_WH    = 8,
  parameter int unsigned T_RP    = 13,
  parameter int unsigned T_REH   = 8,
  parameter int unsigned T_WB    = 50,
  parameter int unsigned T_WHR   = 30
) (
  input  logic       clk,
  input  logic       rst_n,
  // request from the main FSM
  input  logic       req_valid,
  input  nfc_req_t   req,
  output logic       req_ready,
  output logic       done,
  output logic [7:0] rd_data,
  // NAND flash pins (I/O split into out / out-enable / in)
  output logic       nf_cle,
  output logic       nf_ale,
  output logic       nf_we_n,
  output logic       nf_re_n,
  output logic [7:0] nf_io_o,
  output logic       nf_io_oe,
  input  logic [7:0] nf_io_i,
  input  logic       nf_rb,
  output logic       rb_sync
);

  localparam int unsigned CW = 8;

  typedef enum logic [2:0] {
    S_IDLE, S_SETUP, S_WE_LOW, S_WE_HIGH, S_RE_LOW, S_RE_HIGH, S_WAIT_CNT, S_WAIT_RB
  } state_e;

  state_e         state;
  logic [CW-1:0]  cnt;
  nfc_cyc_e       kind_q;
  logic [1:0]     rb_meta;

  // Cycle counts fit the counter; every phase lasts at least one clock.
  initial begin
    assert (T_SETUP >= 1 && T_WP >= 1 && T_WH >= 1 && T_RP >= 1 && T_REH >= 1 &&
            T_WB >= 1 && T_WHR >= 1)
      else $error("nfc_timing_fsm: every timing parameter must be at least 1");
    assert (T_SETUP < 256 && T_WP < 256 && T_WH < 256 && T_RP < 256 && T_REH < 256 &&
            T_WB < 256 && T_WHR < 256)
      else $error("nfc_timing_fsm: timing parameters must be below 256");
  end

  assign req_ready = (state == S_IDLE);
  assign rb_sync   = rb_meta[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rb_meta <= 2'b00;
    end else begin
      rb_meta <= {rb_meta[0], nf_rb};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      cnt      <= '0;
      kind_q   <= CYC_CMD;
      done     <= 1'b0;
      rd_data  <= '0;
      nf_cle   <= 1'b0;
      nf_ale   <= 1'b0;
      nf_we_n  <= 1'b1;
      nf_re_n  <= 1'b1;
      nf_io_o  <= '0;
      nf_io_oe <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          nf_cle   <= 1'b0;
          nf_ale   <= 1'b0;
          nf_we_n  <= 1'b1;
          nf_re_n  <= 1'b1;
          nf_io_oe <= 1'b0;
          if (req_valid) begin
            kind_q <= req.kind;
            unique case (req.kind)
              CYC_CMD, CYC_ADDR, CYC_WDATA: begin
                nf_cle   <= (req.kind == CYC_CMD);
                nf_ale   <= (req.kind == CYC_ADDR);
                nf_io_o  <= req.data;
                nf_io_oe <= 1'b1;
                cnt      <= CW'(T_SETUP - 1);
                state    <= S_SETUP;
              end
              CYC_RDATA: begin
                nf_re_n <= 1'b0;
                cnt     <= CW'(T_RP - 1);
                state   <= S_RE_LOW;
              end
              CYC_WAIT_RB: begin
                cnt   <= CW'(T_WB - 1);
                state <= S_WAIT_CNT;
              end
              default: begin  // CYC_WAIT_WHR
                cnt   <= CW'(T_WHR - 1);
                state <= S_WAIT_CNT;
              end
            endcase
          end
        end
        S_SETUP: begin
          if (cnt == '0) begin
            nf_we_n <= 1'b0;
            cnt     <= CW'(T_WP - 1);
            state   <= S_WE_LOW;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        S_WE_LOW: begin
          if (cnt == '0) begin
            nf_we_n <= 1'b1;           // rising edge: flash latches the byte
            cnt     <= CW'(T_WH - 1);
            state   <= S_WE_HIGH;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        S_WE_HIGH: begin
          if (cnt == '0) begin
            nf_cle   <= 1'b0;
            nf_ale   <= 1'b0;
            nf_io_oe <= 1'b0;
            done     <= 1'b1;
            state    <= S_IDLE;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        S_RE_LOW: begin
          if (cnt == '0) begin
            nf_re_n <= 1'b1;           // rising edge: sample the byte
            rd_data <= nf_io_i;
            cnt     <= CW'(T_REH - 1);
            state   <= S_RE_HIGH;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        S_RE_HIGH: begin
          if (cnt == '0) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        S_WAIT_CNT: begin
          if (cnt == '0) begin
            if (kind_q == CYC_WAIT_RB) begin
              state <= S_WAIT_RB;
            end else begin
              done  <= 1'b1;
              state <= S_IDLE;
            end
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        S_WAIT_RB: begin
          if (rb_sync) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A request is only offered while the FSM is idle or held until taken.
  property p_req_stable;
    @(posedge clk) disable iff (!rst_n) req_valid && !req_ready |=> req_valid && $stable(req);
  endproperty
  a_req_stable: assert property (p_req_stable);

endmodule
