// ccs: the Cache Compute System -- a conventional cache with a vector compute unit beside it.
//
// To the processor the CCS is memory: one word-wide port carries both ordinary loads and stores
// (served by the cache) and the programming of the compute unit, whose registers are mapped at
// CSR_BASE. To main memory it is an ordinary requester on one line-wide port. Inside, the cache
// has two ports, one for the processor and one for the controller of the compute unit, which
// fetches operands through the cache (hits come from the cache, misses straight from memory
// without allocation) and stores results through it (write-through, updating cached copies).
// The processor and the CU run independently: once started, a command runs while the processor
// keeps using the cache for its own data; the processor polls the readiness register.
// This structure follows the document. The register base, the bus protocol (req held until a
// one-cycle ack) and the address decode are this design's choices.
// Ports: cpu_* word bus (byte addresses, word aligned), mem_* line port to main memory (line
// numbers, word write mask), busy high while a command runs.
module ccs
  import ccs_pkg::*;
#(
  parameter int unsigned N        = LINE_WORDS,
  parameter int unsigned LINES    = 16,
  parameter logic [31:0] CSR_BASE = 32'h8000_0000,
  localparam int unsigned LA = 32 - $clog2(N) - 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                cpu_req,
  input  logic                cpu_we,
  input  logic [31:0]         cpu_addr,
  input  logic [W-1:0]        cpu_wdata,
  output logic                cpu_ack,
  output logic [W-1:0]        cpu_rdata,
  output logic                mem_req,
  output logic                mem_we,
  output logic [LA-1:0]       mem_addr,
  output logic [N-1:0][W-1:0] mem_wdata,
  output logic [N-1:0]        mem_wmask,
  input  logic                mem_ack,
  input  logic [N-1:0][W-1:0] mem_rdata,
  output logic                busy
);

  // address decode: 16 register words at CSR_BASE, everything else is cached memory
  logic is_csr;
  assign is_csr = (cpu_addr[31:6] == CSR_BASE[31:6]);

  logic         rg_ack, ch_ack;
  logic [W-1:0] rg_rdata, ch_rdata;
  cfg_t         cfg;
  logic [N-1:0] smask;
  logic         start, done;

  ccs_regs #(.N(N)) u_regs (
    .clk, .rst_n,
    .req(cpu_req && is_csr), .we(cpu_we), .addr(cpu_addr[5:2]), .wdata(cpu_wdata),
    .ack(rg_ack), .rdata(rg_rdata),
    .cfg, .smask, .start, .busy
  );

  // controller <-> cache line port
  logic                lp_req, lp_we, lp_ack;
  logic [LA-1:0]       lp_addr;
  logic [N-1:0][W-1:0] lp_wdata, lp_rdata;
  logic [N-1:0]        lp_wmask;

  // controller <-> compute unit
  logic                cu_valid, cu_first, cu_last;
  logic [N-1:0][W-1:0] cu_a, cu_y;
  logic [N-1:0]        cu_mask;
  a_op_e               cu_a_op;
  b_op_e               cu_b_op;
  c_op_e               cu_c_op;
  logic                map_valid, red_valid, red_mask;
  logic [N-1:0][W-1:0] map_data;
  logic [N-1:0]        map_mask;
  logic [W-1:0]        red_data;

  ccs_ctrl #(.N(N)) u_ctrl (
    .clk, .rst_n, .cfg, .smask, .start, .busy, .done,
    .lp_req, .lp_we, .lp_addr, .lp_wdata, .lp_wmask, .lp_ack, .lp_rdata,
    .cu_valid, .cu_first, .cu_last, .cu_a, .cu_y, .cu_mask, .cu_a_op, .cu_b_op, .cu_c_op,
    .map_valid, .map_data, .map_mask, .red_valid, .red_data, .red_mask
  );

  ccs_cu #(.N(N)) u_cu (
    .clk, .rst_n,
    .in_valid(cu_valid), .in_first(cu_first), .in_last(cu_last),
    .in_a(cu_a), .in_y(cu_y), .in_mask(cu_mask),
    .a_op(cu_a_op), .b_op(cu_b_op), .c_op(cu_c_op),
    .map_valid, .map_data, .map_mask, .red_valid, .red_data, .red_mask
  );

  ccs_cache #(.N(N), .LINES(LINES)) u_cache (
    .clk, .rst_n,
    .cpu_req(cpu_req && !is_csr), .cpu_we, .cpu_addr, .cpu_wdata,
    .cpu_ack(ch_ack), .cpu_rdata(ch_rdata),
    .cu_req(lp_req), .cu_we(lp_we), .cu_addr(lp_addr), .cu_wdata(lp_wdata),
    .cu_wmask(lp_wmask), .cu_ack(lp_ack), .cu_rdata(lp_rdata),
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_wmask, .mem_ack, .mem_rdata
  );

  assign cpu_ack   = rg_ack | ch_ack;
  assign cpu_rdata = is_csr ? rg_rdata : ch_rdata;

endmodule
