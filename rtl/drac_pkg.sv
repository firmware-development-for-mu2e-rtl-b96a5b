// drac_pkg: types and constants shared by the DRAC inter-FPGA link.
//
// The link carries 16-bit words, two 8b/10b symbols per word, so a
// serial word is 20 bits. Control words are flagged per byte with a
// 2-bit K mask. The comma used for word alignment and as idle fill is
// K28.5, sent as the word {D21.5, K28.5}. The APB structs bundle the request and response halves of an
// AMBA APB3 slave port so that the bus decoder and the slaves can pass
// them as one signal each.
package drac_pkg;

  localparam int unsigned APB_AW   = 32;
  localparam int unsigned APB_DW   = 32;

  localparam logic [7:0]  K28_5    = 8'hBC;
  localparam logic [7:0]  D21_5    = 8'hB5;
  // Idle/alignment word: K28.5 in byte 0 (sent first), D21.5 in byte 1.
  // Only byte 0 holds a comma, so the word boundary is unambiguous.
  localparam logic [15:0] COMMA_WORD = {D21_5, K28_5};
  localparam logic [1:0]  COMMA_K    = 2'b01;

  // First seven transmitted bits (a b c d e i f) of a comma symbol.
  localparam logic [6:0]  COMMA_POS = 7'b0011111;
  localparam logic [6:0]  COMMA_NEG = 7'b1100000;

  typedef struct packed {
    logic [APB_AW-1:0] paddr;
    logic              psel;
    logic              penable;
    logic              pwrite;
    logic [APB_DW-1:0] pwdata;
  } apb_req_t;

  typedef struct packed {
    logic [APB_DW-1:0] prdata;
    logic              pready;
    logic              pslverr;
  } apb_rsp_t;

endpackage
