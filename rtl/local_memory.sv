// local_memory: one local memory module (LM) with a read stream and a write
// stream, plus a host port for loading operands and reading results.
//
// On go, the read stream (if cfg.rd_en) reads n words at rd_base,
// rd_base + rd_stride, ... one per cycle and sends them out as valid flits
// one cycle after the address (synchronous read).  The write stream (if
// cfg.wr_en) stores every valid flit arriving at wr_in at wr_base,
// wr_base + wr_stride, ..., and counts them in wr_count; results therefore need
// no schedule, only their valid bits.  go also clears wr_count.
// Host port: h_we writes h_wdata at h_addr; h_rdata returns the word at h_addr
// one cycle later.  A stream write has priority over a host write, and the
// read stream over a host read; the host is expected to use the port while
// no job runs.  Depth and the stream model are this design's choices: the
// source draws local memories without describing them.
module local_memory
  import arith_pkg::*;
#(
  parameter int DEPTH = 4096
) (
  input  logic        clk,
  input  logic        rst_n,
  input  lm_cfg_t     cfg,
  input  logic        go,
  input  logic [15:0] n,
  output flit_t       rd_out,
  input  flit_t       wr_in,
  output logic [15:0] wr_count,
  input  logic        h_we,
  input  logic [15:0] h_addr,
  input  word_t       h_wdata,
  output word_t       h_rdata
);

  localparam int AW = $clog2(DEPTH);

  word_t       mem [DEPTH];
  logic [15:0] rd_ptr, rd_left, wr_ptr;
  logic        rd_issue, rd_issue_q, wr_do;
  logic [AW-1:0] raddr;
  word_t       rdata;

  assign rd_issue = rd_left != '0;
  assign wr_do    = cfg.wr_en && wr_in.v;
  assign raddr    = rd_issue ? rd_ptr[AW-1:0] : h_addr[AW-1:0];

  always_ff @(posedge clk) begin
    if (wr_do)     mem[wr_ptr[AW-1:0]] <= wr_in.w;
    else if (h_we) mem[h_addr[AW-1:0]] <= h_wdata;
    rdata <= mem[raddr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr     <= '0;
      rd_left    <= '0;
      wr_ptr     <= '0;
      wr_count   <= '0;
      rd_issue_q <= 1'b0;
    end else begin
      rd_issue_q <= rd_issue;
      if (go) begin
        rd_ptr   <= cfg.rd_base;
        rd_left  <= cfg.rd_en ? n : '0;
        wr_ptr   <= cfg.wr_base;
        wr_count <= '0;
      end else begin
        if (rd_issue) begin
          rd_ptr  <= rd_ptr + cfg.rd_stride;
          rd_left <= rd_left - 1'b1;
        end
        if (wr_do) begin
          wr_ptr   <= wr_ptr + cfg.wr_stride;
          wr_count <= wr_count + 1'b1;
        end
      end
    end
  end

  assign rd_out  = '{v: rd_issue_q, w: rdata};
  assign h_rdata = rdata;

endmodule
