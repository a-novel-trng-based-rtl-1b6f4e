// trng_pkg: types and constants shared by the ADC-based true random number
// generator and the two units that consume its numbers.
//
// The generator samples an RC circuit with an ADC at random intervals and
// keeps 4 bits of every rotated sample; four samples make one 16-bit word.
// The widths below (12-bit ADC, 16-bit words, 256-entry word pool, 3-bit
// rotate amount) follow the described generator. The logical-operation
// codes and the anticollision command codes are this design's encoding;
// the QueryAdjust UpDn codes follow the ISO/IEC 18000-6 Type C air interface.
package trng_pkg;

  // Width of one generated true random number.
  localparam int unsigned TRN_W  = 16;
  // The low 8 bits of an ADC code address the pool of stored numbers.
  localparam int unsigned ADDR_W = 8;
  // Rotate amount built from the LSBs of three stored numbers.
  localparam int unsigned SBS_W  = 3;

  typedef logic [TRN_W-1:0]  trn_t;
  typedef logic [ADDR_W-1:0] addr_t;

  // Logical operation applied between raw data and a TRN before the cipher.
  typedef enum logic [1:0] {
    LOP_XOR  = 2'd0,
    LOP_XNOR = 2'd1,
    LOP_AND  = 2'd2,
    LOP_OR   = 2'd3
  } lop_e;

  // Inventory commands seen by the tag's anticollision unit.
  typedef enum logic [1:0] {
    AC_NOP         = 2'd0,
    AC_QUERY       = 2'd1,
    AC_QUERYADJUST = 2'd2,
    AC_QUERYREP    = 2'd3
  } ac_cmd_e;

  // QueryAdjust UpDn field.
  localparam logic [2:0] UPDN_INC  = 3'b110;
  localparam logic [2:0] UPDN_SAME = 3'b000;
  localparam logic [2:0] UPDN_DEC  = 3'b011;

endpackage
