// mem_model: behavioural main memory for the testbenches.  A word-addressed
// RAM on the translator's memory bus: a request is acknowledged one clock
// after it is raised (req is held until ack).  Testbenches load and inspect
// the contents through the `mem` array.
module mem_model #(
  parameter int unsigned WORDS = 16384,
  parameter int unsigned AW    = 28
) (
  input  logic          clk,
  input  logic          req,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [31:0]   wdata,
  output logic          ack,
  output logic [31:0]   rdata
);
  logic [31:0] mem [WORDS];
  logic        busy = 1'b0;

  initial for (int i = 0; i < int'(WORDS); i++) mem[i] = 32'h0;

  always_ff @(posedge clk) begin
    if (req && !busy) begin
      busy <= 1'b1;
    end else begin
      busy <= 1'b0;
    end
    if (req && busy && we) mem[addr % WORDS] <= wdata;
  end
  assign ack   = req && busy;
  assign rdata = mem[addr % WORDS];
endmodule
