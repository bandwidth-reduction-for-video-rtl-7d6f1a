// ddr_sdram_model: behavioural model of a four-bank DDR SDRAM (not
// synthesizable; simulation only).
//
// Works on the controller's clock, with two 64-bit words per clock. Commands:
// ACT opens a row; RDA / WRA move one burst of BL words (BL/2 clocks) and
// close the row with auto-precharge. Read data appears T_CL clocks after RDA;
// write data is taken on the BL/2 clocks that follow WRA. Words never written
// read back as a hash of their address, so any data can be checked.
// The model checks the timing rules and counts each breach in `violations`:
// ACT to an open or still precharging bank, ACT closer than T_RC to the
// previous ACT of the bank, column command to a closed bank or sooner than
// T_RCD after ACT, and data bursts overlapping on the bus.
// While cke is low (the controller is in reset) the command bus is ignored.
module ddr_sdram_model
  import mif_pkg::*;
#(
  parameter longint BL    = 8,
  parameter longint T_RCD = 3,
  parameter longint T_RAS = 7,
  parameter longint T_RP  = 3,
  parameter longint T_RC  = 10,
  parameter longint T_CL  = 2,
  parameter longint T_WR  = 2
) (
  input  logic              clk,
  input  logic              cke,
  input  sdram_cmd_e        cmd,
  input  logic [BANK_W-1:0] ba,
  input  logic [ROW_W-1:0]  addr,
  input  ddr_beat_t         dq_in,
  input  logic              dq_oe,
  output ddr_beat_t         dq_out
);
  localparam longint BEATS = BL / 2;

  typedef logic [BANK_W+ROW_W+COL_W-1:0] waddr_t;

  logic [DQ_W-1:0] mem [waddr_t];
  int              violations = 0;
  int              n_act = 0, n_rd = 0, n_wr = 0;
  longint          cyc = 0;
  longint          last_act [4] = '{default: -1000};
  longint          ready_at [4] = '{default: 0};
  bit              open_b   [4] = '{default: 0};
  logic [ROW_W-1:0] open_row [4];
  ddr_beat_t       rsched [longint];
  waddr_t          wsched [longint];
  longint          bus_busy_until = -1;
  ddr_beat_t       rbeat;

  function automatic logic [DQ_W-1:0] init_word(input waddr_t a);
    return {32'hA5A5_0000 ^ 32'(a), 32'(a) * 32'h9E37_79B1};
  endfunction

  function automatic logic [DQ_W-1:0] read_word(input waddr_t a);
    return mem.exists(a) ? mem[a] : init_word(a);
  endfunction

  task automatic violation(input string what);
    violations++;
    if (violations < 10) $display("SDRAM model: %s at clock %0d", what, cyc);
  endtask

  initial dq_out = '0;

  always @(posedge clk) begin
    // write data of the clock that just ended
    if (wsched.exists(cyc)) begin
      if (!dq_oe) violation("write data not driven");
      mem[wsched[cyc]]      = dq_in[0];
      mem[wsched[cyc] + 1'b1] = dq_in[1];
      wsched.delete(cyc);
    end
    // command of the clock that just ended
    case (cke ? cmd : CMD_NOP)
      CMD_ACT: begin
        n_act++;
        if (open_b[ba]) violation("ACT to an open bank");
        if (cyc < ready_at[ba]) violation("ACT before precharge done");
        if (cyc - last_act[ba] < T_RC) violation("ACT within tRC");
        open_b[ba]   = 1;
        open_row[ba] = addr;
        last_act[ba] = cyc;
      end
      CMD_RDA, CMD_WRA: begin
        longint pc, first, last;
        bit wr;
        wr = (cmd == CMD_WRA);
        if (wr) n_wr++; else n_rd++;
        if (!open_b[ba]) violation("column command to a closed bank");
        if (cyc - last_act[ba] < T_RCD) violation("column command within tRCD");
        first = wr ? cyc + 1 : cyc + T_CL;
        last  = first + BEATS - 1;
        if (first <= bus_busy_until) violation("data bus conflict");
        bus_busy_until = last;
        for (longint k = 0; k < BEATS; k++) begin
          waddr_t a;
          a = {ba, open_row[ba], COL_W'(addr) + COL_W'(2 * k)};
          if (wr) wsched[cyc + 1 + k] = a;
          else    rsched[cyc + T_CL + k] = '{read_word(a + 1'b1), read_word(a)};
        end
        pc = wr ? cyc + 1 + BEATS + T_WR : cyc + BEATS;
        if (last_act[ba] + T_RAS > pc) pc = last_act[ba] + T_RAS;
        ready_at[ba] = pc + T_RP;
        open_b[ba]   = 0;
      end
      default: ;
    endcase
    cyc++;
    // read data of the clock that starts now
    rbeat = '0;
    if (rsched.exists(cyc)) begin
      rbeat = rsched[cyc];
      rsched.delete(cyc);
    end
    dq_out <= rbeat;
  end
endmodule
