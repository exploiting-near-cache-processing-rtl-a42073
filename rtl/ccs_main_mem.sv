// ccs_main_mem: main memory of the prototype system, one line wide.
//
// The document builds its main memory from on-chip block RAM and gives no more of it; this is
// a single-port RAM of DEPTH lines of N 32-bit words (256 lines of 2048 bits, 64 KiB, by
// default: a size of this design's choosing). It serves one request at a time over the same
// line port the cache uses: req held until ack; ack is a one-cycle pulse one clock after req
// rises. A write stores only the words whose wmask bit is set; a read returns the whole line
// with ack. The line address wraps modulo DEPTH. Contents are not reset.
module ccs_main_mem
  import ccs_pkg::*;
#(
  parameter int unsigned N     = LINE_WORDS,
  parameter int unsigned DEPTH = 256,
  localparam int unsigned LN = $clog2(N),
  localparam int unsigned LA = 32 - LN - 2,
  localparam int unsigned DW = $clog2(DEPTH)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                req,
  input  logic                we,
  input  logic [LA-1:0]       addr,
  input  logic [N-1:0][W-1:0] wdata,
  input  logic [N-1:0]        wmask,
  output logic                ack,
  output logic [N-1:0][W-1:0] rdata
);

  logic [N-1:0][W-1:0] mem [DEPTH];
  logic [DW-1:0]       a;

  assign a = addr[DW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ack <= 1'b0;
    else        ack <= req & ~ack;
  end

  always_ff @(posedge clk) begin
    if (req && !ack) begin
      if (we) begin
        for (int w = 0; w < N; w++) begin
          if (wmask[w]) mem[a][w] <= wdata[w];
        end
      end
      rdata <= mem[a];
    end
  end

endmodule
