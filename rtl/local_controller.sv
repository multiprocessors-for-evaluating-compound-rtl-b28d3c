// local_controller: programs the arithmetic network and supervises the
// macropipeline of one job.
//
// The host writes the configuration of the next job into shadow tables
// (one write port per table: PE programs, routing-network outputs,
// allocation read ports, allocation write ports, memory streams) while the
// current configuration stays active.  A pulse on start then runs a job:
//   RECONF  copies the shadow tables into the active ones, one PE (with its
//           three routing outputs and three allocation read ports) per cycle,
//           then one local memory (write port and stream) per cycle:
//           ALPHA = M + K cycles of reconfiguration overhead;
//   GO      starts every memory stream (go pulse) for n operand blocks;
//   RUN     waits until every memory with an enabled write stream has stored
//           n results;
//   DONE    raises done for one cycle and returns to IDLE.
// cycles counts the cycles from start to done (the T_d of the performance
// model); cfg_cycles the reconfiguration cycles.  The source states what the
// controller must do (check resources, program the routing network and the
// allocation network, supervise the macropipeline) but not how; this
// sequencing is this design's.
module local_controller
  import arith_pkg::*;
#(
  parameter int M = 10,
  parameter int K = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  // shadow-table writes
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
  // job control
  input  logic        start,
  input  logic [15:0] n,
  output logic        busy,
  output logic        done,
  output logic [31:0] cycles,
  output logic [15:0] cfg_cycles,
  // active configuration
  output pe_cfg_t     pe_cfg [M],
  output route_cfg_t  rt_cfg [3*M],
  output alloc_cfg_t  ar_cfg [3*M],
  output alloc_cfg_t  aw_cfg [K],
  output lm_cfg_t     lm_cfg [K],
  output logic        lm_go,
  output logic [15:0] lm_n,
  input  logic [15:0] lm_wr_count [K]
);

  typedef enum logic [2:0] {S_IDLE, S_RECONF, S_GO, S_RUN, S_DONE} state_e;

  state_e      state;
  logic [7:0]  step;
  logic [15:0] n_q;
  logic        all_written;

  pe_cfg_t    pe_sh [M];
  route_cfg_t rt_sh [3*M];
  alloc_cfg_t ar_sh [3*M];
  alloc_cfg_t aw_sh [K];
  lm_cfg_t    lm_sh [K];

  // shadow tables
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < M; i++)   pe_sh[i] <= '0;
      for (int i = 0; i < 3*M; i++) begin rt_sh[i] <= '0; ar_sh[i] <= '0; end
      for (int i = 0; i < K; i++)   begin aw_sh[i] <= '0; lm_sh[i] <= '0; end
    end else begin
      if (pe_we && int'(pe_idx) < M)   pe_sh[int'(pe_idx)] <= pe_data;
      if (rt_we && int'(rt_idx) < 3*M) rt_sh[int'(rt_idx)] <= rt_data;
      if (ar_we && int'(ar_idx) < 3*M) ar_sh[int'(ar_idx)] <= ar_data;
      if (aw_we && int'(aw_idx) < K)   aw_sh[int'(aw_idx)] <= aw_data;
      if (lm_we && int'(lm_idx) < K)   lm_sh[int'(lm_idx)] <= lm_data;
    end
  end

  always_comb begin
    all_written = 1'b1;
    for (int j = 0; j < K; j++) begin
      if (lm_cfg[j].wr_en && lm_wr_count[j] < n_q) all_written = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      step       <= '0;
      n_q        <= '0;
      cycles     <= '0;
      cfg_cycles <= '0;
      for (int i = 0; i < M; i++)   pe_cfg[i] <= '0;
      for (int i = 0; i < 3*M; i++) begin rt_cfg[i] <= '0; ar_cfg[i] <= '0; end
      for (int i = 0; i < K; i++)   begin aw_cfg[i] <= '0; lm_cfg[i] <= '0; end
    end else begin
      if (state != S_IDLE && state != S_DONE) cycles <= cycles + 1;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            state      <= S_RECONF;
            step       <= '0;
            n_q        <= n;
            cycles     <= 32'd1;
            cfg_cycles <= '0;
          end
        end
        S_RECONF: begin
          cfg_cycles <= cfg_cycles + 1;
          if (int'(step) < M) begin
            pe_cfg[int'(step)] <= pe_sh[int'(step)];
            for (int p = 0; p < 3; p++) begin
              rt_cfg[3*int'(step)+p] <= rt_sh[3*int'(step)+p];
              ar_cfg[3*int'(step)+p] <= ar_sh[3*int'(step)+p];
            end
          end else begin
            aw_cfg[int'(step)-M] <= aw_sh[int'(step)-M];
            lm_cfg[int'(step)-M] <= lm_sh[int'(step)-M];
          end
          if (int'(step) == M + K - 1) state <= S_GO;
          step <= step + 1'b1;
        end
        S_GO:   state <= S_RUN;
        S_RUN:  if (all_written) state <= S_DONE;
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign lm_go = (state == S_GO);
  assign lm_n  = n_q;
  assign busy  = (state != S_IDLE);
  assign done  = (state == S_DONE);

endmodule
