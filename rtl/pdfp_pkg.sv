// pdfp_pkg: types and constants shared by the PDFP look-up table module and
// its VME controller, the PDFP-CTRL.
//
// Every word on the serial link is 32 bits wide. Its four top bits, C3..C0,
// are a code; on words going back from the PDFP to the controller bit 27 is
// the B direction (DIR) and bits 26..0 are data. The command and reply codes
// and the trigger table entry layout follow the published register layout;
// the line framing (start bit, 32 data bits MSB first, odd parity, stop bit)
// and the bit period in clocks are this design's own choice.
package pdfp_pkg;

  localparam int unsigned LINK_W       = 32;  // bits per link word
  localparam int unsigned PARAM_W      = 27;  // D26..D0 parameter/data field
  localparam int unsigned BANK_AW      = 17;  // tables start every 0x20000 words
  localparam int unsigned TABLE_SEL_W  = 5;   // TB4..TB0
  localparam int unsigned CLKS_PER_BIT = 4;   // 40 MHz clock, 10 Mbit/s link

  // Command codes, controller to PDFP (C3..C0)
  typedef enum logic [3:0] {
    CMD_STATUS   = 4'd0,  // send back a status word
    CMD_CLR_LINK = 4'd1,  // clear RxEP
    CMD_SET_ADDR = 4'd2,  // set table fill pointer
    CMD_FILL     = 4'd3,  // write table word, pointer increments
    CMD_MODE     = 4'd5,  // D00: add correction input
    CMD_TRIG     = 4'd8   // write trigger table entry
  } cmd_e;

  // Reply codes, PDFP to controller (C3..C0)
  typedef enum logic [3:0] {
    RPL_STATUS = 4'd0,    // status in D07..D00
    RPL_INPUT  = 4'd6,    // copy of the 34-pin input connector
    RPL_OUTPUT = 4'd7     // copy of the 34-pin output connector
  } reply_e;

  // Trigger table entry, parameter bits D10..D00
  typedef struct packed {
    logic       ib;    // D10 send input value at each B pulse (entry 0)
    logic       ob;    // D09 send output value at each B pulse (entry 0)
    logic       is;    // D08 send input value at each strobe (entry 0)
    logic       os;    // D07 send output value at each strobe (entry 0)
    logic       bclr;  // D06 clear and disable the B counter
    logic       ts;    // D05 select table tb
    logic [4:0] tb;    // D04..D00 table number
  } trig_entry_t;

  // Status as returned in D07..D00 and shown in ctrl D07..D00
  typedef struct packed {
    logic       rxep;  // PDFP receiver error
    logic       merr;  // selected table does not exist
    logic       bof;   // B counter overflow
    logic [4:0] tb;    // table in use
  } pdfp_status_t;

  function automatic logic [LINK_W-1:0] make_word(input logic [3:0] code,
                                                  input logic dir,
                                                  input logic [PARAM_W-1:0] data);
    return {code, dir, data};
  endfunction

endpackage
