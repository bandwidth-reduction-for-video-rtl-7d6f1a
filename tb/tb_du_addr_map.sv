// tb_du_addr_map: checks the data-unit placement of du_addr_map.
//
// For a 1920-pixel-wide, 1088-line picture at a random base it sweeps every
// data unit (field, unit row, unit column) and checks, against rules worked
// out from the frame coordinates rather than the bit formula:
//   - the two fields of a 16-line group lie in opposite bank pairs, and the
//     pairing reverses in the next 16-line group;
//   - horizontally and vertically adjacent units of one field differ in bank;
//   - no two units share a (bank, row, column) address;
//   - columns are burst aligned and inside the page.
module tb_du_addr_map;
  import mif_pkg::*;

  localparam int M = 16, N = 4, BL = 8, UPR = 32;
  localparam int LINE = 1920, HEIGHT = 1088;

  logic               field;
  logic [UR_W-1:0]    urow;
  logic [UC_W-1:0]    ucol;
  logic [COORD_W-1:0] line;
  logic [UIDX_W-1:0]  base;
  logic [BANK_W-1:0]  bank;
  logic [ROW_W-1:0]   row;
  logic [COL_W-1:0]   col;

  du_addr_map #(.M(M), .BL(BL), .UNITS_PER_ROW(UPR)) dut (.*);

  int checks = 0, failures = 0;
  bit seen [bit [ROW_W+COL_W+BANK_W-1:0]];
  logic [1:0] bank_of [2][HEIGHT/2/N][LINE/M];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s f=%0d r=%0d c=%0d bank=%0d row=%0d col=%0d",
                                  what, field, urow, ucol, bank, row, col);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    line = COORD_W'(LINE);
    base = UIDX_W'($urandom_range(0, 20000) * 2);
    for (int f = 0; f < 2; f++)
      for (int r = 0; r < HEIGHT / 2 / N; r++)
        for (int c = 0; c < LINE / M; c++) begin
          int y, grp;
          bit [ROW_W+COL_W+BANK_W-1:0] key;
          field = f[0]; urow = UR_W'(r); ucol = UC_W'(c);
          #1;
          y   = 2 * N * r + f;          // first frame line of the unit
          grp = y / 16;                 // 16-line group
          // first field in banks 0/2 in even groups, 1/3 in odd groups
          check(bank[0] == ((f + grp) % 2 == 1), "field bank pair");
          check(col % BL == 0, "burst alignment");
          key = {bank, row, col};
          check(!seen.exists(key), "unique address");
          seen[key] = 1;
          bank_of[f][r][c] = bank;
        end
    for (int f = 0; f < 2; f++)
      for (int r = 0; r < HEIGHT / 2 / N; r++)
        for (int c = 0; c < LINE / M; c++) begin
          field = f[0]; urow = UR_W'(r); ucol = UC_W'(c);
          if (c > 0) check(bank_of[f][r][c] != bank_of[f][r][c-1], "horizontal neighbour bank");
          if (r > 0) check(bank_of[f][r][c] != bank_of[f][r-1][c], "vertical neighbour bank");
          check(bank_of[f][r][c] != bank_of[1-f][r][c], "other field bank");
        end
    // a field column of four unit rows visits all four banks
    for (int f = 0; f < 2; f++) begin
      bit [3:0] hit = '0;
      for (int r = 0; r < 4; r++) hit[bank_of[f][r][0]] = 1'b1;
      check(hit == 4'hf, "field reaches all banks");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
