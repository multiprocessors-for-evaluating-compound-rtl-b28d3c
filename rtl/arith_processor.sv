// arith_processor: a dynamic arithmetic processor, the reconfigurable
// arithmetic network of one processor node.
//
// M identical pipelined PEs and a crossbar routing network form the
// arithmetic network; an allocation network joins K local memories and a
// register file of scalars to the PEs; a local controller programs all of
// them and runs each job.  A job is one arithmetic network, set up for a
// compound function (complex divide, interval multiply, an FFT butterfly, a
// loop with an IF merged into one pipeline, ...): the host loads operand
// vectors into the memories and scalars into the register file, writes the
// network's configuration and pulses start with the number n of operand
// blocks.  The controller reconfigures (ALPHA = M + K cycles), then the
// memories stream one operand block per cycle through the allocation network
// (BETA cycles), the PEs (7 cycles each) and the routing network (BETA cycles
// per hop, plus programmed noncompute delays), and the results return through
// the allocation network (BETA cycles) into memory.  done rises when every
// enabled write stream holds n results; cycles then holds the job time,
//   T_d = ALPHA + (c+1)*7 + (c+2)*BETA + n - 1 + 5,
// for a critical path of c+1 PEs and c routing hops (the 5 cycles are the
// controller's go cycle, the memory address and data cycles, the memory
// write and the done test).
//
// The routing network's sources are the result ports of all PEs (index
// 3*pe + port); its outputs are the PE network operand ports (same indexing).
// Allocation read ports are indexed the same way; allocation sources are the
// memories (0..K-1) then the register entries (K..K+R-1).
// The host ports stand in for the processor's local I/O; the address
// mapping, the global network and the global controller of the enclosing
// multiprocessor are outside this block.
module arith_processor
  import arith_pkg::*;
#(
  parameter int M      = 10,     // PEs
  parameter int K      = 8,      // local memories
  parameter int R      = 8,      // register file entries
  parameter int DEPTH  = 4096,   // words per local memory
  parameter int BETA   = 5,      // routing / allocation network stages
  parameter int RDEPTH = 63,     // max noncompute delay per routing output
  parameter int CDEPTH = 63,     // max noncompute delay on PE port C
  parameter int ROM_AW = 8       // reciprocal ROM address bits (plus sign)
) (
  input  logic        clk,
  input  logic        rst_n,
  // configuration (shadow tables of the local controller)
  input  logic        pe_we,
  input  logic [7:0]  pe_idx,
  input  pe_cfg_t     pe_data,
  input  logic        rt_we,
  input  logic [7:0]  rt_idx,
  input  route_cfg_t  rt_data,
  input  logic        ar_we,
  input  logic [7:0]  ar_idx,
  input  alloc_cfg_t  ar_data,
  input  logic        aw_we,
  input  logic [7:0]  aw_idx,
  input  alloc_cfg_t  aw_data,
  input  logic        lm_we,
  input  logic [7:0]  lm_idx,
  input  lm_cfg_t     lm_data,
  // register file
  input  logic        rf_we,
  input  logic [7:0]  rf_idx,
  input  word_t       rf_wdata,
  // host access to the local memories
  input  logic [7:0]  h_lm,
  input  logic        h_we,
  input  logic [15:0] h_addr,
  input  word_t       h_wdata,
  output word_t       h_rdata,
  // job control
  input  logic        start,
  input  logic [15:0] n,
  output logic        busy,
  output logic        done,
  output logic [31:0] cycles,
  output logic [15:0] cfg_cycles
);

  localparam int NP = 3 * M;

  pe_cfg_t     pe_cfg [M];
  route_cfg_t  rt_cfg [NP];
  alloc_cfg_t  ar_cfg [NP];
  alloc_cfg_t  aw_cfg [K];
  lm_cfg_t     lm_cfg [K];
  logic        lm_go;
  logic [15:0] lm_n;
  logic [15:0] lm_wr_count [K];

  flit_t pe_out  [NP];
  flit_t pe_net  [NP];
  flit_t pe_mem  [NP];
  flit_t lm_rd   [K];
  flit_t lm_wr   [K];
  flit_t rf_rd   [R];
  word_t lm_hrd  [K];

  local_controller #(.M(M), .K(K)) u_ctrl (
    .clk(clk), .rst_n(rst_n),
    .pe_we(pe_we), .pe_idx(pe_idx), .pe_data(pe_data),
    .rt_we(rt_we), .rt_idx(rt_idx), .rt_data(rt_data),
    .ar_we(ar_we), .ar_idx(ar_idx), .ar_data(ar_data),
    .aw_we(aw_we), .aw_idx(aw_idx), .aw_data(aw_data),
    .lm_we(lm_we), .lm_idx(lm_idx), .lm_data(lm_data),
    .start(start), .n(n), .busy(busy), .done(done),
    .cycles(cycles), .cfg_cycles(cfg_cycles),
    .pe_cfg(pe_cfg), .rt_cfg(rt_cfg), .ar_cfg(ar_cfg), .aw_cfg(aw_cfg),
    .lm_cfg(lm_cfg), .lm_go(lm_go), .lm_n(lm_n), .lm_wr_count(lm_wr_count)
  );

  for (genvar j = 0; j < K; j++) begin : g_lm
    local_memory #(.DEPTH(DEPTH)) u_lm (
      .clk(clk), .rst_n(rst_n), .cfg(lm_cfg[j]), .go(lm_go), .n(lm_n),
      .rd_out(lm_rd[j]), .wr_in(lm_wr[j]), .wr_count(lm_wr_count[j]),
      .h_we(h_we && int'(h_lm) == j), .h_addr(h_addr), .h_wdata(h_wdata),
      .h_rdata(lm_hrd[j])
    );
  end

  logic [7:0] h_lm_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) h_lm_q <= '0;
    else        h_lm_q <= h_lm;
  end
  assign h_rdata = (int'(h_lm_q) < K) ? lm_hrd[int'(h_lm_q)] : '0;

  register_file #(.NREG(R)) u_rf (
    .clk(clk), .rst_n(rst_n), .we(rf_we), .idx(rf_idx), .wdata(rf_wdata), .rd(rf_rd)
  );

  allocation_network #(.NLM(K), .NREG(R), .NPE(NP), .BETA(BETA)) u_alloc (
    .clk(clk), .rst_n(rst_n), .rd_cfg(ar_cfg), .wr_cfg(aw_cfg),
    .lm_rd(lm_rd), .rf_rd(rf_rd), .pe_mem(pe_mem), .pe_out(pe_out), .lm_wr(lm_wr)
  );

  routing_network #(.NSRC(NP), .NDST(NP), .BETA(BETA), .DDEPTH(RDEPTH)) u_route (
    .clk(clk), .rst_n(rst_n), .cfg(rt_cfg), .src(pe_out), .dst(pe_net)
  );

  for (genvar i = 0; i < M; i++) begin : g_pe
    flit_t [NPORT-1:0] mi, ni, po;
    for (genvar p = 0; p < NPORT; p++) begin : g_port
      assign mi[p]          = pe_mem[3*i+p];
      assign ni[p]          = pe_net[3*i+p];
      assign pe_out[3*i+p]  = po[p];
    end
    pe #(.ROM_AW(ROM_AW), .CDEPTH(CDEPTH)) u_pe (
      .clk(clk), .rst_n(rst_n), .cfg(pe_cfg[i]), .mem_in(mi), .net_in(ni), .out(po)
    );
  end

endmodule
