// Behavioural model of the CC2420 SPI port, for simulation only.
// Decodes command bytes taken on SCLK rising edges while CSn is low:
// strobes (addresses 0x00-0x0E) are logged in `strobes`, register writes
// update `regs`, RAM accesses ({1,A[6:0]},{A[8:7],R/W,x}) read or write
// `ram` with auto-increment, 0x3E fills `txfifo`, and a 0x7F read returns
// bytes from `rxfifo`. SO changes shortly after SCLK falling edges; the
// status byte returned during a command is 0x40. Raising CSn ends a
// transaction. `ntxn` counts transactions.
module cc2420_model (
  input  logic sclk,
  input  logic csn,
  input  logic si,
  output logic so
);
  typedef enum {P_CMD, P_RAM2, P_RAMDATA, P_REG1, P_REG2, P_TXF, P_RXF} phase_t;
  phase_t phase = P_CMD;
  logic [15:0] regs [64];
  logic [7:0]  ram  [512];
  logic [7:0]  strobes [$];
  logic [7:0]  txfifo [$];
  logic [7:0]  rxfifo [$];
  int          ntxn = 0;
  int          bitn = 0;
  logic [7:0]  inb = '0, cmd = '0, resp = '0;
  logic [8:0]  addr = '0;
  logic        rd = 1'b0;

  initial begin
    so = 1'b0;
    for (int i = 0; i < 64; i++) regs[i] = '0;
    for (int i = 0; i < 512; i++) ram[i] = '0;
  end

  always @(posedge csn) begin
    phase = P_CMD;
    bitn = 0;
  end
  always @(negedge csn) ntxn++;

  // Next response byte, chosen when its first bit is due.
  function automatic logic [7:0] next_resp();
    logic [7:0] r;
    r = 8'h40;
    unique case (phase)
      P_RXF:     if (rxfifo.size() > 0) r = rxfifo.pop_front(); else r = 8'h00;
      P_RAMDATA: if (rd) r = ram[addr];
      P_REG1:    if (rd) r = regs[addr[5:0]][15:8];
      P_REG2:    if (rd) r = regs[addr[5:0]][7:0];
      default:   r = 8'h40;
    endcase
    return r;
  endfunction

  always @(negedge sclk) begin
    #1;
    if (!csn) begin
      if (bitn % 8 == 0) resp = next_resp();
      so = resp[7 - bitn % 8];
    end
  end

  always @(posedge sclk) if (!csn) begin
    inb = {inb[6:0], si};
    bitn++;
    if (bitn % 8 == 0) begin
      unique case (phase)
        P_CMD: begin
          cmd = inb;
          if (inb[7]) phase = P_RAM2;
          else if (inb[5:0] <= 6'h0E) strobes.push_back({2'b0, inb[5:0]});
          else if (inb[5:0] == 6'h3E) phase = P_TXF;
          else if (inb[5:0] == 6'h3F) phase = P_RXF;
          else begin
            addr = {3'b0, inb[5:0]};
            rd = inb[6];
            phase = P_REG1;
          end
        end
        P_RAM2: begin
          addr = {inb[7:6], cmd[6:0]};
          rd = inb[5];
          phase = P_RAMDATA;
        end
        P_RAMDATA: begin
          if (!rd) ram[addr] = inb;
          addr = addr + 1'b1;
        end
        P_REG1: begin
          if (!rd) regs[addr[5:0]][15:8] = inb;
          phase = P_REG2;
        end
        P_REG2: begin
          if (!rd) regs[addr[5:0]][7:0] = inb;
          phase = P_CMD;
        end
        P_TXF: txfifo.push_back(inb);
        default: ;
      endcase
    end
  end
endmodule
