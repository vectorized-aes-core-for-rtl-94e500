// bus_mem_model: behavioural model of the external memory on the IO bus
// (testbench only). A write request stores bus_wdata at bus_addr in the
// same cycle; a read request returns the word on rdata one cycle later.
// Counts requests so testbenches can measure bus occupation.
module bus_mem_model #(
  parameter int unsigned BUS_W  = 64,
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned DEPTH  = 1024
) (
  input  logic              clk,
  input  logic              req,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [BUS_W-1:0]  wdata,
  output logic [BUS_W-1:0]  rdata
);
  logic [BUS_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (req && we) mem[addr % DEPTH] <= wdata;
    if (req && !we) rdata <= mem[addr % DEPTH];
  end

  function automatic void poke(int unsigned a, logic [BUS_W-1:0] d);
    mem[a % DEPTH] = d;
  endfunction

  function automatic logic [BUS_W-1:0] peek(int unsigned a);
    return mem[a % DEPTH];
  endfunction
endmodule
