// ccs_system: processor-side view of the prototype: the Cache Compute System and main memory.
//
// The document's system puts a soft-core processor, the CCS (cache plus compute unit) and a
// block-RAM main memory in a row: processor -> CCS -> memory. The processor is not part of this
// RTL; its data bus is the port of this module. Every access the processor makes goes through
// the CCS: words outside the register window are cached memory, words at CSR_BASE .. +0x3c are
// the compute unit's registers (command, length, constant, addresses, stride, mask, start,
// readiness). Bus: cpu_req with cpu_we/cpu_addr/cpu_wdata held until the one-cycle cpu_ack;
// cpu_rdata valid with cpu_ack. busy is high while a command runs.
// Defaults: 64 lanes (2048-bit lines), 16 cache lines as in the document; 256 lines (64 KiB) of
// main memory, a size of this design's choosing.
module ccs_system
  import ccs_pkg::*;
#(
  parameter int unsigned N         = LINE_WORDS,
  parameter int unsigned LINES     = 16,
  parameter int unsigned MEM_LINES = 256,
  parameter logic [31:0] CSR_BASE  = 32'h8000_0000
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         cpu_req,
  input  logic         cpu_we,
  input  logic [31:0]  cpu_addr,
  input  logic [W-1:0] cpu_wdata,
  output logic         cpu_ack,
  output logic [W-1:0] cpu_rdata,
  output logic         busy
);

  localparam int unsigned LA = 32 - $clog2(N) - 2;

  logic                mem_req, mem_we, mem_ack;
  logic [LA-1:0]       mem_addr;
  logic [N-1:0][W-1:0] mem_wdata, mem_rdata;
  logic [N-1:0]        mem_wmask;

  ccs #(.N(N), .LINES(LINES), .CSR_BASE(CSR_BASE)) u_ccs (
    .clk, .rst_n, .cpu_req, .cpu_we, .cpu_addr, .cpu_wdata, .cpu_ack, .cpu_rdata,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_wmask, .mem_ack, .mem_rdata, .busy
  );

  ccs_main_mem #(.N(N), .DEPTH(MEM_LINES)) u_mem (
    .clk, .rst_n, .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .wmask(mem_wmask), .ack(mem_ack), .rdata(mem_rdata)
  );

endmodule
