// ccs_cache: direct-mapped cache of the Cache Compute System, shared by the CPU and the CU.
//
// LINES lines of N 32-bit words (16 lines of 2048 bits by default), each with a tag and one
// valid bit. Two requesters share it, and one line-wide port leads to main memory:
//   * CPU port (32-bit words): write-through and write-no-allocate. A read hit answers from the
//     cache; a read miss fetches the line from memory and allocates it. A write goes to memory
//     and also updates the cached word when the line is present.
//   * CU port (whole lines with a word mask): read- and write-no-allocate, so CU operands do not
//     evict processor data. A read hit answers from the cache; a read miss forwards the line
//     from memory without keeping it. A write goes to memory under the word mask and updates
//     the cached copy when the line is present.
// These policies follow the document. The arbitration is this design's choice: one request at
// a time, alternating between the two ports when both wait.
// Protocol on every port: req (with its address and data) is held until ack, a one-cycle pulse;
// read data is valid with ack. Timing: a hit is acknowledged one clock after it is taken; a
// miss or write adds the memory's own latency.
// Addresses: the CPU gives a byte address (word aligned); the CU and the memory port use line
// numbers. Line index = low IW bits of the line number, tag = the rest.
module ccs_cache
  import ccs_pkg::*;
#(
  parameter int unsigned N     = LINE_WORDS,
  parameter int unsigned LINES = 16,
  localparam int unsigned LN = $clog2(N),
  localparam int unsigned LA = 32 - LN - 2,
  localparam int unsigned IW = $clog2(LINES),
  localparam int unsigned TW = LA - IW
) (
  input  logic                clk,
  input  logic                rst_n,
  // CPU port
  input  logic                cpu_req,
  input  logic                cpu_we,
  input  logic [31:0]         cpu_addr,
  input  logic [W-1:0]        cpu_wdata,
  output logic                cpu_ack,
  output logic [W-1:0]        cpu_rdata,
  // CU port
  input  logic                cu_req,
  input  logic                cu_we,
  input  logic [LA-1:0]       cu_addr,
  input  logic [N-1:0][W-1:0] cu_wdata,
  input  logic [N-1:0]        cu_wmask,
  output logic                cu_ack,
  output logic [N-1:0][W-1:0] cu_rdata,
  // main-memory port
  output logic                mem_req,
  output logic                mem_we,
  output logic [LA-1:0]       mem_addr,
  output logic [N-1:0][W-1:0] mem_wdata,
  output logic [N-1:0]        mem_wmask,
  input  logic                mem_ack,
  input  logic [N-1:0][W-1:0] mem_rdata
);

  typedef enum logic [1:0] {C_IDLE, C_MEM, C_RESP} cstate_e;

  cstate_e             state;
  logic [N-1:0][W-1:0] data_q [LINES];
  logic [TW-1:0]       tag_q  [LINES];
  logic [LINES-1:0]    valid_q;

  logic                sel_cu;      // request being served comes from the CU
  logic                prio_cu;     // CU wins the next tie
  logic                r_we;
  logic [LA-1:0]       r_line;
  logic [LN-1:0]       r_word;
  logic [N-1:0][W-1:0] r_wdata;
  logic [N-1:0]        r_wmask;
  logic [N-1:0][W-1:0] resp_q;

  // request chosen in C_IDLE
  logic                pick_cu;
  logic [LA-1:0]       p_line;
  logic                p_we;
  logic [IW-1:0]       p_idx;
  logic                p_hit;
  logic [IW-1:0]       r_idx;
  logic                r_hit;

  assign pick_cu = cu_req && (!cpu_req || prio_cu);
  assign p_line  = pick_cu ? cu_addr : cpu_addr[31:LN+2];
  assign p_we    = pick_cu ? cu_we : cpu_we;
  assign p_idx   = p_line[IW-1:0];
  assign p_hit   = valid_q[p_idx] && (tag_q[p_idx] == p_line[LA-1:IW]);
  assign r_idx   = r_line[IW-1:0];
  assign r_hit   = valid_q[r_idx] && (tag_q[r_idx] == r_line[LA-1:IW]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= C_IDLE;
      valid_q <= '0;
      sel_cu  <= 1'b0;
      prio_cu <= 1'b0;
      r_we    <= 1'b0;
      r_line  <= '0;
      r_word  <= '0;
      r_wmask <= '0;
    end else begin
      unique case (state)
        C_IDLE: begin
          if (cpu_req || cu_req) begin
            sel_cu  <= pick_cu;
            prio_cu <= ~pick_cu;
            r_we    <= p_we;
            r_line  <= p_line;
            r_word  <= cpu_addr[LN+1:2];
            r_wmask <= pick_cu ? cu_wmask : (N'(1) << cpu_addr[LN+1:2]);
            state   <= (!p_we && p_hit) ? C_RESP : C_MEM;
          end
        end
        C_MEM: begin
          if (mem_ack) begin
            if (!r_we && !sel_cu) begin        // CPU read miss: allocate
              valid_q[r_idx] <= 1'b1;
              tag_q[r_idx]   <= r_line[LA-1:IW];
            end
            state <= C_RESP;
          end
        end
        C_RESP: state <= C_IDLE;
        default: state <= C_IDLE;
      endcase
    end
  end

  // data array, response register and write data
  always_ff @(posedge clk) begin
    if (state == C_IDLE && (cpu_req || cu_req)) begin
      r_wdata <= pick_cu ? cu_wdata : {N{cpu_wdata}};
      resp_q  <= data_q[p_idx];
    end
    if (state == C_MEM && mem_ack) begin
      if (!r_we) begin
        resp_q <= mem_rdata;
        if (!sel_cu) data_q[r_idx] <= mem_rdata;
      end else if (r_hit) begin
        for (int w = 0; w < N; w++) begin
          if (r_wmask[w]) data_q[r_idx][w] <= r_wdata[w];
        end
      end
    end
  end

  assign mem_req   = (state == C_MEM);
  assign mem_we    = r_we;
  assign mem_addr  = r_line;
  assign mem_wdata = r_wdata;
  assign mem_wmask = r_wmask;

  assign cpu_ack   = (state == C_RESP) && !sel_cu;
  assign cu_ack    = (state == C_RESP) && sel_cu;
  assign cpu_rdata = resp_q[r_word];
  assign cu_rdata  = resp_q;

  // a requester keeps its request up until it is acknowledged
  a_cpu_hold: assert property (@(posedge clk) disable iff (!rst_n)
                               cpu_req && !cpu_ack |=> cpu_req);
  a_cu_hold:  assert property (@(posedge clk) disable iff (!rst_n)
                               cu_req && !cu_ack |=> cu_req);

endmodule
