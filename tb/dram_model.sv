// dram_model: behavioural model of the board's external memory, for
// simulation only (not synthesizable by intent).
//
// Word-addressed storage of grid cells with a request/grant read port and
// a request/grant write port. Grants are random (rd_pct / wr_pct percent of
// the cycles a request is waiting), and each granted read returns its data
// between MIN_LAT and MAX_LAT cycles later, in request order. Counters
// report how many cycles a request waited without a grant, for the
// testbench's coverage of stalls. The testbench loads and inspects mem
// directly.
module dram_model
  import fdtd_pkg::*;
#(
  parameter int unsigned WORDS     = 128,
  parameter int unsigned AW        = 7,
  parameter int unsigned RD_PCT    = 100,
  parameter int unsigned WR_PCT    = 100,
  parameter int unsigned MIN_LAT   = 2,
  parameter int unsigned MAX_LAT   = 6
) (
  input  logic          clk,
  input  logic          rd_req,
  input  logic [AW-1:0] rd_addr,
  output logic          rd_gnt,
  output logic          rd_valid,
  output cell_t         rd_data,
  input  logic          wr_req,
  input  logic [AW-1:0] wr_addr,
  input  cell_t         wr_data,
  output logic          wr_gnt
);

  cell_t mem [WORDS];
  cell_t rq_data [$];
  longint rq_due [$];
  longint cyc = 0;
  longint rd_wait = 0, wr_wait = 0;
  longint last_due = 0;
  int unsigned rd_pct = RD_PCT, wr_pct = WR_PCT;   // may be changed by the testbench

  initial begin
    rd_gnt = 1'b0;
    wr_gnt = 1'b0;
    rd_valid = 1'b0;
    rd_data = '0;
  end

  // Grants are decided away from the clock edge so the design sees them
  // settled at the next rising edge.
  always @(negedge clk) begin
    rd_gnt <= rd_req && ($urandom_range(1, 100) <= rd_pct);
    wr_gnt <= wr_req && ($urandom_range(1, 100) <= wr_pct);
  end

  always @(posedge clk) begin
    longint due;
    cyc++;
    if (rd_req && !rd_gnt) rd_wait++;
    if (wr_req && !wr_gnt) wr_wait++;
    if (rd_req && rd_gnt) begin
      due = cyc + longint'($urandom_range(MIN_LAT, MAX_LAT));
      if (due <= last_due) due = last_due + 1;
      last_due = due;
      rq_data.push_back(mem[rd_addr]);
      rq_due.push_back(due);
    end
    if (wr_req && wr_gnt) mem[wr_addr] <= wr_data;
    if (rq_due.size() != 0 && rq_due[0] <= cyc) begin
      rd_valid <= 1'b1;
      rd_data  <= rq_data.pop_front();
      void'(rq_due.pop_front());
    end else begin
      rd_valid <= 1'b0;
    end
  end

endmodule
