// Configuration FSM for the CC2420 radio (ConfigureFSM).
//
// Runs once after reset, as a straight sequence of stages:
//   RESET     reset_chipn low for one clock, then RESET_WAIT (16) clocks so
//             the board's supply has settled before any command works;
//   STROBE    SXOSCON strobe, turning on the crystal oscillator;
//   WAITLONG  WAITLONG clocks (20000 = 2 ms at 100 ns, twice the data
//             sheet's minimum) for the oscillator to start;
//   REGWRITE  one 120-bit transaction writing five registers back to back:
//             MDMCTRL0 (address recognition, auto ACK), MDMCTRL1, IOCFG0
//             (FIFOP threshold at its maximum), SECCTRL0 (security off) and
//             FSCTRL (frequency computed from `channel`);
//   WAIT2     one idle clock with CSn high;
//   MEM1WRITE PANID to RAM 0x168/0x169, LSB first (address auto-increments);
//   WAIT3     CSn high, which ends the RAM access;
//   MEM2WRITE SHORTADDR to RAM 0x16A/0x16B;
//   ASKREAD1/2 read both fields back to panid_rb / shortaddr_rb so software
//             or a testbench can confirm the writes (WAIT4 between them);
//   IDLE      configured stays high until the next reset.
// Each stage issues one cc2420_spi request and waits for its done pulse; the
// SPI master keeps CSn high for at least a clock between transactions.
// IOCFG0's value 0x007F and the FSCTRL formula come from the radio's data
// sheet rather than from the design description.
module cc2420_config
  import cc2420_pkg::*;
#(
  parameter int unsigned RESET_WAIT = 16,
  parameter int unsigned WAITLONG   = 20000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [7:0]  channel,
  input  logic [15:0] panid,
  input  logic [15:0] shortaddr,
  output logic        reset_chipn,
  output logic        configured,
  output logic [15:0] panid_rb,
  output logic [15:0] shortaddr_rb,
  output spi_req_t    spi_req,
  input  spi_rsp_t    spi_rsp
);
  typedef enum logic [3:0] {
    S_RESET, S_STROBE, S_WAITLONG, S_REGWRITE, S_WAIT2, S_MEM1WRITE, S_WAIT3,
    S_MEM2WRITE, S_WAIT3B, S_ASKREAD1, S_WAIT4, S_ASKREAD2, S_IDLE
  } state_t;
  state_t state;
  logic [15:0] wcnt;
  logic        issued;

  logic [119:0] regburst;
  assign regburst = {REG_MDMCTRL0, 16'h0AF2,
                     REG_MDMCTRL1, 16'h0500,
                     REG_IOCFG0,   16'h007F,
                     REG_SECCTRL0, 16'h01C4,
                     REG_FSCTRL,   fsctrl_for(channel)};

  // Transaction issued in each SPI state and the state that follows it.
  logic                spi_state;
  logic [MAX_BITS-1:0] run_bits;
  logic [7:0]          run_n;
  state_t              run_next;
  always_comb begin
    spi_state = 1'b1;
    run_bits = '0;
    run_n = '0;
    run_next = state;
    unique case (state)
      S_STROBE: begin
        run_bits = {CMD_SXOSCON, 136'b0};
        run_n = 8'd8;
        run_next = S_WAITLONG;
      end
      S_REGWRITE: begin
        run_bits = {regburst, 24'b0};
        run_n = 8'd120;
        run_next = S_WAIT2;
      end
      S_MEM1WRITE: begin
        run_bits = {ram_cmd(RAM_PANID, 1'b0), panid[7:0], panid[15:8], 112'b0};
        run_n = 8'd32;
        run_next = S_WAIT3;
      end
      S_MEM2WRITE: begin
        run_bits = {ram_cmd(RAM_SHORTADDR, 1'b0), shortaddr[7:0], shortaddr[15:8], 112'b0};
        run_n = 8'd32;
        run_next = S_WAIT3B;
      end
      S_ASKREAD1: begin
        run_bits = {ram_cmd(RAM_PANID, 1'b1), 128'b0};
        run_n = 8'd32;
        run_next = S_WAIT4;
      end
      S_ASKREAD2: begin
        run_bits = {ram_cmd(RAM_SHORTADDR, 1'b1), 128'b0};
        run_n = 8'd32;
        run_next = S_IDLE;
      end
      default: spi_state = 1'b0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_RESET;
      wcnt <= '0;
      issued <= 1'b0;
      reset_chipn <= 1'b1;
      configured <= 1'b0;
      panid_rb <= '0;
      shortaddr_rb <= '0;
      spi_req <= '0;
    end else begin
      spi_req.start <= 1'b0;
      if (spi_state) begin
        if (!issued) begin
          spi_req.start <= 1'b1;
          spi_req.bits <= run_bits;
          spi_req.nbits <= run_n;
          issued <= 1'b1;
        end else if (spi_rsp.done) begin
          issued <= 1'b0;
          state <= run_next;
        end
      end
      reset_chipn <= 1'b1;
      unique case (state)
        S_RESET: begin
          if (wcnt == '0) reset_chipn <= 1'b0;
          if (int'(wcnt) == RESET_WAIT) begin
            wcnt <= '0;
            state <= S_STROBE;
          end else wcnt <= wcnt + 1'b1;
        end
        S_STROBE: ;  // SPI transaction, issued above
        S_WAITLONG: begin
          if (int'(wcnt) == WAITLONG - 1) begin
            wcnt <= '0;
            state <= S_REGWRITE;
          end else wcnt <= wcnt + 1'b1;
        end
        S_REGWRITE: ;  // SPI transaction, issued above
        S_WAIT2:    state <= S_MEM1WRITE;
        S_MEM1WRITE: ;  // SPI transaction, issued above
        S_WAIT3:    state <= S_MEM2WRITE;
        S_MEM2WRITE: ;
        S_WAIT3B:   state <= S_ASKREAD1;
        S_ASKREAD1: begin
          if (issued && spi_rsp.done) panid_rb <= {spi_rsp.rx[7:0], spi_rsp.rx[15:8]};
        end
        S_WAIT4:    state <= S_ASKREAD2;
        S_ASKREAD2: begin
          if (issued && spi_rsp.done) shortaddr_rb <= {spi_rsp.rx[7:0], spi_rsp.rx[15:8]};
        end
        S_IDLE:     configured <= 1'b1;
        default:    state <= S_RESET;
      endcase
    end
  end
endmodule
