// ext_mem_model: behavioural model of the external memory chip, for
// simulation only (not synthesizable as a part of the design: the real part
// is an off-chip device). One access per cycle, always accepted; a read
// returns its word LAT cycles after the request, in order, with rvalid.
// Writes take effect at the clock edge of the request. Testbenches reach
// the contents through the 'mem' array.
module ext_mem_model #(
  parameter int unsigned AW    = 24,
  parameter int unsigned DW    = 16,
  parameter int unsigned WORDS = 1 << 20,
  parameter int unsigned LAT   = 3
) (
  input  logic          clk,
  input  logic          req,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic          rvalid,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [WORDS];
  logic          pv [LAT];
  logic [DW-1:0] pd [LAT];

  initial begin
    for (int i = 0; i < LAT; i++) pv[i] = 1'b0;
  end

  always_ff @(posedge clk) begin
    if (req && we) mem[addr % WORDS] <= wdata;
    pv[0] <= req && !we;
    pd[0] <= mem[addr % WORDS];
    for (int i = 1; i < LAT; i++) begin
      pv[i] <= pv[i-1];
      pd[i] <= pd[i-1];
    end
  end

  assign rvalid = pv[LAT-1];
  assign rdata  = pd[LAT-1];

endmodule
