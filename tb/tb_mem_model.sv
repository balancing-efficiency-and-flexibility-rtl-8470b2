// tb_mem_model: behavioural data memory for testbenches (stands in for the
// host's data cache). NLINES lines of 256 bits. A request is granted in the
// cycle it is made, or after a pseudo-random wait when RAND_WAIT is set;
// read data returns one cycle after the grant with rvalid. Writes honour the
// 32 byte enables. Contents are reached hierarchically through `mem`.
module tb_mem_model #(
  parameter int NLINES    = 256,
  parameter bit RAND_WAIT = 1'b0
) (
  input  logic         clk,
  input  logic         req,
  input  logic         we,
  input  logic [26:0]  line,
  input  logic [255:0] wdata,
  input  logic [31:0]  be,
  output logic         gnt,
  output logic         rvalid,
  output logic [255:0] rdata
);
  logic [255:0] mem [NLINES];
  logic         wait_bit;
  int           nwaits = 0;

  initial begin
    for (int i = 0; i < NLINES; i++) mem[i] = '0;
    rvalid = 0;
    rdata = '0;
    wait_bit = 0;
  end

  assign gnt = req && !wait_bit;

  always @(posedge clk) begin
    wait_bit <= RAND_WAIT ? ($urandom_range(0, 2) == 0) : 1'b0;
    if (req && !gnt) nwaits++;
    rvalid <= gnt && !we;
    if (gnt && !we) rdata <= mem[int'(line) % NLINES];
    if (gnt && we)
      for (int b = 0; b < 32; b++)
        if (be[b]) mem[int'(line) % NLINES][8*b +: 8] <= wdata[8*b +: 8];
  end
endmodule
