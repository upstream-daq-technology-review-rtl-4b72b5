// bm_pkg: constants and types shared by the buffer-manager modules.
//
// Super-packets are kept in DDR4 as 64-bit "rows" of four 16-bit words, the
// first word of a row in bits [63:48]. Each super-packet starts with the row
// {16'hBEEF, 16'hCAFE, length, link} followed by the packet as it arrived on
// its link: flags, four timestamp words (most significant first), payload.
// The magic words and the row layout follow the document's storage figure;
// the bit order inside rows and wide words is this design's choice.
package bm_pkg;
  localparam logic [15:0] MAGIC0 = 16'hBEEF;
  localparam logic [15:0] MAGIC1 = 16'hCAFE;
  localparam int unsigned CMD_WORDS = 10;   // 2 ID + 4 start + 4 end 16-bit words

  // Event selection ("trigger") command.
  typedef struct packed {
    logic [31:0] id;
    logic [63:0] t_start;
    logic [63:0] t_end;
  } trig_cmd_t;

  // IPBus bus signals (IPBus firmware convention).
  typedef struct packed {
    logic [31:0] addr;
    logic [31:0] wdata;
    logic        strobe;
    logic        write;
  } ipb_wbus_t;

  typedef struct packed {
    logic [31:0] rdata;
    logic        ack;
    logic        err;
  } ipb_rbus_t;
endpackage
