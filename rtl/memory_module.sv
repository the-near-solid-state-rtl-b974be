// memory_module: one memory module of the recorder, 44 DRAMs of 4M x 4 bits
// on two boards, seen from the internal bus as 2^ADDR_W words of 44 bits
// (eleven DRAMs wide, four ranks deep at the full size).
//
// The module is wired to both internal buses, A and B; `bus_sel` picks the
// one it obeys (0 = A). A cycle whose chip select names MODULE_ID is carried
// out: WRITE stores wdata, READ returns the word on `rdata` with `rvalid`
// one cycle later, REFRESH (sent to all modules) advances the refresh row
// counter that stands for the DRAMs' own CAS-before-RAS refresh.
//
// This is a behavioural stand-in for purchased DRAM devices written as a
// plain array so that it synthesises to a memory; the devices' internal
// 137-bit EDAC and their voltage translators are not modelled. Word width
// and depth follow from the document's device count and capacity; the bus
// protocol is this design's choice.
module memory_module
  import ssdr_pkg::*;
#(
  parameter int unsigned ADDR_W    = 24,
  parameter int unsigned MODULE_ID = 0
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     bus_sel,
  input  bus_req_t bus_a,
  input  bus_req_t bus_b,
  output word_t    rdata,
  output logic     rvalid,
  output logic [11:0] refresh_row
);

  word_t    mem [2**ADDR_W];
  bus_req_t req;
  logic     sel;

  assign req = bus_sel ? bus_b : bus_a;
  assign sel = req.cs[MODULE_ID];

  always_ff @(posedge clk) begin
    if (sel && req.op == BUS_WRITE) mem[req.addr[ADDR_W-1:0]] <= req.wdata;
    if (sel && req.op == BUS_READ)  rdata <= mem[req.addr[ADDR_W-1:0]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rvalid      <= 1'b0;
      refresh_row <= '0;
    end else begin
      rvalid <= sel && req.op == BUS_READ;
      if (sel && req.op == BUS_REFRESH) refresh_row <= refresh_row + 1'b1;
    end
  end

endmodule
