// mif_pkg: types and constants shared by the video main-memory interface.
//
// The memory interface moves rectangular pixel blocks between video clients
// (motion compensation, video output) and a DDR SDRAM in which a picture is
// stored as "data units": one SDRAM burst each, holding M x N pixels of one
// video field. This package holds the transfer request a client issues, the
// data-unit request the translator produces, the SDRAM command encoding and
// the block-type table used by the statistics collector.
//
// The block types follow the prediction block sets of an MPEG-2 decoder
// (progressive set Vp and interlaced set Vi, sizes 2^p and 2^p +- 1 or +- 2 from
// sub-pixel motion compensation). Field widths (12-bit coordinates, 7-bit
// block sizes) are this design's choice, sized for high-definition pictures.
package mif_pkg;

  localparam int unsigned COORD_W = 12;  // pixel / line coordinates, up to 4095
  localparam int unsigned BSZ_W   = 7;   // block width/height, up to 127
  localparam int unsigned UIDX_W  = 17;  // data-unit index inside one bank
  localparam int unsigned UR_W    = 10;  // unit row inside a field
  localparam int unsigned UC_W    = 8;   // unit column
  localparam int unsigned ROW_W   = 12;  // SDRAM row address
  localparam int unsigned COL_W   = 8;   // SDRAM column address (64-bit words)
  localparam int unsigned BANK_W  = 2;   // four banks
  localparam int unsigned CID_W   = 1;   // client id: 0 = MC, 1 = VO
  localparam int unsigned DQ_W    = 64;  // memory data bus width

  localparam logic [CID_W-1:0] CID_MC = 1'b0;
  localparam logic [CID_W-1:0] CID_VO = 1'b1;

  // One call of the client transfer interface: a Bx x By block at (x, y).
  // For an interlaced (field) block, y is the frame line of its first line and
  // its lines are y, y+2, ...; for a progressive block the lines are y..y+By-1.
  typedef struct packed {
    logic                 rd;      // 1 = read, 0 = write
    logic                 interl;  // 1 = interlaced (field) block
    logic [BSZ_W-1:0]     bx;
    logic [BSZ_W-1:0]     by;
    logic [COORD_W-1:0]   x;
    logic [COORD_W-1:0]   y;
    logic [COORD_W-1:0]   line;    // pixels per video line of the picture
    logic [UIDX_W-1:0]    base;    // picture start, in data units per bank
  } xfer_req_t;

  // Identity of a data unit inside a picture; travels with its burst data.
  typedef struct packed {
    logic [CID_W-1:0] client;
    logic             field;       // 0 = first (top) field
    logic [UR_W-1:0]  urow;        // unit row inside the field
    logic [UC_W-1:0]  ucol;        // unit column
    logic             last;        // last unit of its transfer
  } du_tag_t;

  // A data-unit access, already mapped to the SDRAM.
  typedef struct packed {
    logic              rd;
    logic [BANK_W-1:0] bank;
    logic [ROW_W-1:0]  row;
    logic [COL_W-1:0]  col;        // first column of the burst
    du_tag_t           tag;
  } du_req_t;

  // SDRAM command bus. Column commands always carry auto-precharge.
  typedef enum logic [1:0] {
    CMD_NOP = 2'd0,
    CMD_ACT = 2'd1,   // row activate (RAS)
    CMD_RDA = 2'd2,   // read with auto-precharge (CAS)
    CMD_WRA = 2'd3    // write with auto-precharge (CAS)
  } sdram_cmd_e;

  // Two 64-bit words per clock: one per clock edge of the DDR bus.
  typedef logic [1:0][DQ_W-1:0] ddr_beat_t;

  // ---------------- block-type classes for the statistics ----------------
  localparam int unsigned NCLASS      = 25;
  localparam int unsigned CLASS_W     = 5;
  localparam int unsigned NTYPES      = 22;
  localparam int unsigned CLS_WRITE   = 22;  // any write (reconstructed MBs)
  localparam int unsigned CLS_DISPLAY = 23;  // any read by the video output
  localparam int unsigned CLS_OTHER   = 24;

  // Prediction block types: entries 0..7 progressive (Vp), 8..21 interlaced (Vi).
  // Each entry is {interl, Bx, By}.
  typedef struct packed {
    logic             interl;
    logic [BSZ_W-1:0] bx;
    logic [BSZ_W-1:0] by;
  } btype_t;

  localparam btype_t BTYPES [NTYPES] = '{
    '{1'b0, 7'd16, 7'd16}, '{1'b0, 7'd17, 7'd16}, '{1'b0, 7'd16, 7'd17}, '{1'b0, 7'd17, 7'd17},
    '{1'b0, 7'd16, 7'd8 }, '{1'b0, 7'd18, 7'd8 }, '{1'b0, 7'd16, 7'd9 }, '{1'b0, 7'd18, 7'd9 },
    '{1'b1, 7'd16, 7'd16}, '{1'b1, 7'd17, 7'd16}, '{1'b1, 7'd16, 7'd17}, '{1'b1, 7'd17, 7'd17},
    '{1'b1, 7'd16, 7'd8 }, '{1'b1, 7'd18, 7'd8 }, '{1'b1, 7'd16, 7'd9 }, '{1'b1, 7'd18, 7'd9 },
    '{1'b1, 7'd17, 7'd8 }, '{1'b1, 7'd17, 7'd9 }, '{1'b1, 7'd16, 7'd4 }, '{1'b1, 7'd18, 7'd4 },
    '{1'b1, 7'd16, 7'd5 }, '{1'b1, 7'd18, 7'd5 }
  };

  // Class of a transfer: display reads and writes first, then the table.
  function automatic logic [CLASS_W-1:0] classify(input xfer_req_t r,
                                                  input logic [CID_W-1:0] client);
    logic [CLASS_W-1:0] c;
    c = CLASS_W'(CLS_OTHER);
    if (client == CID_VO && r.rd) c = CLASS_W'(CLS_DISPLAY);
    else if (!r.rd)               c = CLASS_W'(CLS_WRITE);
    else begin
      for (int i = NTYPES - 1; i >= 0; i--)
        if (BTYPES[i].interl == r.interl && BTYPES[i].bx == r.bx && BTYPES[i].by == r.by)
          c = CLASS_W'(i);
    end
    return c;
  endfunction

endpackage
