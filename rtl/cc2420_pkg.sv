// Constants and request/response types for driving a CC2420 radio over SPI.
//
// The radio controllers (configuration, transmit, ACK check, receive) never
// touch the pins themselves: each builds a whole transaction as a
// left-aligned bit string and hands it to cc2420_spi through spi_req_t,
// getting the bits read back on SO through spi_rsp_t. Command bytes follow
// the radio's format: bit 7 selects RAM (1) or register (0), bit 6 read (1)
// or write (0), bits 5:0 the register or strobe address.
package cc2420_pkg;
  localparam int unsigned MAX_BITS = 144;  // 0x7F command + 17 frame bytes

  // Command strobes
  localparam logic [7:0] CMD_SXOSCON  = 8'h01;
  localparam logic [7:0] CMD_SRXON    = 8'h03;
  localparam logic [7:0] CMD_STXON    = 8'h04;
  localparam logic [7:0] CMD_SFLUSHRX = 8'h08;
  localparam logic [7:0] CMD_SFLUSHTX = 8'h09;
  // FIFO access
  localparam logic [7:0] CMD_TXFIFO_WR = 8'h3E;
  localparam logic [7:0] CMD_RXFIFO_RD = 8'h7F;
  // Configuration registers (write command = address)
  localparam logic [7:0] REG_MDMCTRL0 = 8'h11;
  localparam logic [7:0] REG_MDMCTRL1 = 8'h12;
  localparam logic [7:0] REG_IOCFG0   = 8'h1C;
  localparam logic [7:0] REG_SECCTRL0 = 8'h19;
  localparam logic [7:0] REG_FSCTRL   = 8'h18;
  // RAM addresses of the address-recognition fields
  localparam logic [8:0] RAM_PANID     = 9'h168;
  localparam logic [8:0] RAM_SHORTADDR = 9'h16A;

  localparam logic [15:0] FCF_DATA_ACKREQ = 16'h8861;
  localparam logic [15:0] FCF_ACK         = 16'h0002;

  typedef struct packed {
    logic                start;   // one-cycle request
    logic [7:0]          nbits;   // transaction length in bits
    logic [MAX_BITS-1:0] bits;    // sent MSB first from bits[MAX_BITS-1]
  } spi_req_t;

  typedef struct packed {
    logic                busy;
    logic                done;    // one-cycle, CSn already high again
    logic [MAX_BITS-1:0] rx;      // SO bits, the last one in rx[0]
  } spi_rsp_t;

  // First two bytes of a RAM access: {1, A[6:0]}, {A[8:7], read, 00000}.
  function automatic logic [15:0] ram_cmd(input logic [8:0] addr, input logic rd);
    return {1'b1, addr[6:0], addr[8:7], rd, 5'b0};
  endfunction

  // FSCTRL for an IEEE 802.15.4 channel 11..26: LOCK_THR=1, FREQ=357+5(k-11).
  function automatic logic [15:0] fsctrl_for(input logic [7:0] channel);
    return 16'h4000 | (16'd357 + 16'd5 * (16'(channel) - 16'd11));
  endfunction
endpackage
