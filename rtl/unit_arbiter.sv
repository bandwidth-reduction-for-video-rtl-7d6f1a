// unit_arbiter: picks which client's data unit goes to the SDRAM next.
//
// Each client (motion compensation, video output) presents its next data-unit
// request. The choice depends on the state of the banks: a request whose bank
// can be activated now (bank_busy low) wins over one whose bank is still in
// its row cycle, so the bus is not left idle while another client could use
// a free bank. Among equal candidates a round-robin pointer, moved past each
// winner, gives fairness. Grants are per data unit, so transfers of different
// clients may interleave; every unit carries its client in its tag.
//
// Combinational grant, one unit per clock; the pointer updates when a unit
// leaves (out_valid && out_ready). The bank-aware priority follows the
// published description ("depending on the state of the memory banks");
// the round-robin rule is this design's choice.
module unit_arbiter
  import mif_pkg::*;
#(
  parameter int unsigned NCLI = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NCLI-1:0]      in_valid,
  output logic [NCLI-1:0]      in_ready,
  input  du_req_t              in_req [NCLI],
  input  logic [3:0]           bank_busy,
  output logic                 out_valid,
  input  logic                 out_ready,
  output du_req_t              out
);
  localparam int unsigned IW = (NCLI > 1) ? $clog2(NCLI) : 1;

  logic [IW-1:0]   ptr;       // client with the highest priority this cycle
  logic [NCLI-1:0] free_c;    // requests whose bank is free
  logic [IW-1:0]   sel;
  logic            found;

  always_comb begin
    for (int i = 0; i < NCLI; i++)
      free_c[i] = in_valid[i] && !bank_busy[in_req[i].bank];
    sel   = '0;
    found = 1'b0;
    // first pass: free banks, in round-robin order from ptr
    for (int k = 0; k < NCLI; k++)
      if (!found && free_c[(int'(ptr) + k) % NCLI]) begin
        sel   = IW'((int'(ptr) + k) % NCLI);
        found = 1'b1;
      end
    // second pass: any valid request
    for (int k = 0; k < NCLI; k++)
      if (!found && in_valid[(int'(ptr) + k) % NCLI]) begin
        sel   = IW'((int'(ptr) + k) % NCLI);
        found = 1'b1;
      end
    out_valid = found;
    out       = in_req[sel];
  end

  always_comb begin
    in_ready = '0;
    if (found) in_ready[sel] = out_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr <= '0;
    else if (found && out_ready)
      ptr <= (int'(sel) == NCLI - 1) ? '0 : IW'(sel + 1'b1);
  end
endmodule
