// du_addr_map: places one data unit of a picture in the SDRAM.
//
// A data unit is one burst: M x N pixels taken from N lines of ONE video field
// (lines y, y+2, ... of the frame), so a field can be fetched without the
// other field's lines. The bank of a unit is chosen so that neighbouring units
// lie in different banks and bursts can be interleaved:
//   bank[0] = field ^ urow[1]  : the two fields sit in opposite bank pairs
//                                (banks 0/2 against 1/3), and this parity is
//                                reversed every two unit rows of a field, i.e.
//                                every 16 frame lines for N = 4, so a field
//                                access still reaches all four banks;
//   bank[1] = ucol[0] ^ urow[0]: a checkerboard inside one field.
// The four units that share (urow, ucol>>1) therefore occupy four different
// banks, and they share one index inside their bank:
//   idx = base + urow * ceil(line / 2M) + ucol / 2
// idx is split into SDRAM row (idx / UNITS_PER_ROW) and burst column
// ((idx % UNITS_PER_ROW) * BL).
//
// The field/bank rules and the parity reversal follow the published mapping;
// the in-bank index formula, the row/column split and the picture base are
// this design's choices. Purely combinational.
module du_addr_map
  import mif_pkg::*;
#(
  parameter int unsigned M             = 16,  // data-unit width in pixels
  parameter int unsigned BL            = 8,   // burst length in bus words
  parameter int unsigned UNITS_PER_ROW = 32   // bursts per SDRAM page
) (
  input  logic               field,
  input  logic [UR_W-1:0]    urow,
  input  logic [UC_W-1:0]    ucol,
  input  logic [COORD_W-1:0] line,
  input  logic [UIDX_W-1:0]  base,
  output logic [BANK_W-1:0]  bank,
  output logic [ROW_W-1:0]   row,
  output logic [COL_W-1:0]   col
);
  localparam int unsigned PAIR_SH = $clog2(2 * M);
  localparam int unsigned UPR_SH  = $clog2(UNITS_PER_ROW);
  localparam int unsigned BL_SH   = $clog2(BL);

  logic [COORD_W-1:0] pairs;   // unit pairs per field unit row
  logic [UIDX_W-1:0]  idx;

  always_comb begin
    pairs = COORD_W'((COORD_W'(line) + COORD_W'(2 * M - 1)) >> PAIR_SH);
    idx   = base + UIDX_W'(urow * pairs) + UIDX_W'(ucol >> 1);
    bank  = {ucol[0] ^ urow[0], field ^ urow[1]};
    row   = ROW_W'(idx >> UPR_SH);
    col   = COL_W'((idx & UIDX_W'(UNITS_PER_ROW - 1)) << BL_SH);
  end
endmodule
