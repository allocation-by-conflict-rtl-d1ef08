// abc_mem_model: behavioural model of the secondary cache / main memory seen
// by the ABC data cache. Not synthesizable; for simulation only.
//
// Line-wide requests with a valid/ready handshake. Reads are pipelined: each
// read accepted at a rising edge is answered LAT edges later (LAT = 18 is the
// miss latency of the modelled system), in the order accepted, with its id
// and line address; an answer is held while resp_ready is low, delaying the
// ones behind it. Writes are absorbed at once and answered by nothing. With
// stall_en and STALL_PCT > 0, req_ready is randomly held low, mostly for
// single cycles and now and then for a burst of 16 to 47 cycles. Lines never
// written read as abc_tb_pkg::init_line. All outputs change only at rising
// edges.
module abc_mem_model
  import abc_pkg::*;
#(
  parameter int unsigned LAT       = 18,
  parameter int unsigned STALL_PCT = 0
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     stall_en,
  input  logic     req_valid,
  output logic     req_ready,
  input  mem_req_t req,
  output logic     resp_valid,
  input  logic     resp_ready,
  output mid_t     resp_id,
  output laddr_t   resp_laddr,
  output line_t    resp_rdata,
  output int       n_reads,
  output int       n_writes,
  output int       n_stalls,
  output int       n_resp_held
);
  typedef struct {
    laddr_t laddr;
    mid_t   id;
    int     due;
  } rd_t;

  line_t mem [laddr_t];
  rd_t   q [$];
  logic  stall;
  int    burst;
  int    t;

  assign req_ready = !stall;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stall <= 1'b0; burst = 0; t = 0; q.delete();
      resp_valid <= 1'b0; resp_id <= '0; resp_laddr <= '0; resp_rdata <= '0;
      n_reads <= 0; n_writes <= 0; n_stalls <= 0; n_resp_held <= 0;
    end else begin
      automatic logic presenting = resp_valid;
      if (burst > 0) burst = burst - 1;
      else if (stall_en && STALL_PCT > 0 && ($urandom % 100) < 2) burst = 16 + int'($urandom % 32);
      stall <= stall_en && (STALL_PCT > 0) && (burst > 0 || ($urandom % 100) < STALL_PCT);
      if (req_valid && !req_ready) n_stalls <= n_stalls + 1;
      if (resp_valid && !resp_ready) n_resp_held <= n_resp_held + 1;
      if (resp_valid && resp_ready) begin
        void'(q.pop_front());
        presenting = 1'b0;
      end
      if (req_valid && req_ready) begin
        if (req.we) begin
          mem[req.laddr] = req.wdata;
          n_writes <= n_writes + 1;
        end else begin
          q.push_back('{laddr: req.laddr, id: req.id, due: t + int'(LAT) - 1});
          n_reads <= n_reads + 1;
        end
      end
      if (!presenting && q.size() > 0 && q[0].due <= t) begin
        presenting = 1'b1;
        resp_id    <= q[0].id;
        resp_laddr <= q[0].laddr;
        resp_rdata <= mem.exists(q[0].laddr) ? mem[q[0].laddr] : abc_tb_pkg::init_line(q[0].laddr);
      end
      resp_valid <= presenting;
      t = t + 1;
    end
  end
endmodule
