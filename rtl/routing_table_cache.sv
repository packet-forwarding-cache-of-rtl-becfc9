// routing_table_cache: the packet forwarding cache of one input port.
//
// 2,048 entries, four-way set-associative (512 sets). An entry holds a cache
// key (see pfc_pkg) and the output port for it. Tags and ports live in a
// memory with a registered read; valid bits and the per-set replacement
// pointers are flip-flops, so `flush` empties the whole cache in one cycle
// (the design refreshes the cache wholesale when routing changes, e.g. after a
// hardware fault or before a job).
//
// Timing: rd_idx is read at every clock edge; in the next cycle the four ways
// of that set are compared with cmp_key (cmp_idx must be the index that was
// read) and hit / hit_way / hit_port / victim come out combinationally. A
// write (wr_en) lands at the clock edge; a read of the same set at that same
// edge sees the old ways, so the last write is kept one cycle and forwarded
// into the compare. The owner re-reads the held set while it is stalled.
//
// Victim: the first invalid way, else a per-set round-robin pointer that
// advances when it is used. The replacement policy is this module's own
// choice; with the topology hashes the tags of a switch never overfill a set.
module routing_table_cache
  import pfc_pkg::*;
#(
  parameter int unsigned SETS = CACHE_SETS,
  parameter int unsigned WAYS = CACHE_WAYS
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    flush,
  // read
  input  logic [$clog2(SETS)-1:0] rd_idx,
  // compare (the set read at the last edge)
  input  logic [$clog2(SETS)-1:0] cmp_idx,
  input  cache_key_t              cmp_key,
  output logic                    hit,
  output logic [$clog2(WAYS)-1:0] hit_way,
  output logic [PORT_W-1:0]       hit_port,
  output logic [$clog2(WAYS)-1:0] victim,
  // write (fill or update)
  input  logic                    wr_en,
  input  logic [$clog2(SETS)-1:0] wr_idx,
  input  logic [$clog2(WAYS)-1:0] wr_way,
  input  cache_key_t              wr_key,
  input  logic [PORT_W-1:0]       wr_port
);

  localparam int unsigned SI_W = $clog2(SETS);
  localparam int unsigned WY_W = $clog2(WAYS);

  typedef struct packed {
    cache_key_t        key;
    logic [PORT_W-1:0] port;
  } entry_t;

  entry_t              mem   [SETS][WAYS];
  entry_t              rdata [WAYS];
  logic [WAYS-1:0]     valid [SETS];
  logic [WY_W-1:0]     rr    [SETS];

  // last write, forwarded for one cycle
  logic                fwd_v;
  logic [SI_W-1:0]     fwd_idx;
  logic [WY_W-1:0]     fwd_way;
  entry_t              fwd_e;

  // storage: registered read, one way written per edge
  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_idx][wr_way] <= '{key: wr_key, port: wr_port};
    for (int w = 0; w < WAYS; w++) rdata[w] <= mem[rd_idx][w];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        valid[s] <= '0;
        rr[s]    <= '0;
      end
      fwd_v <= 1'b0;
    end else if (flush) begin
      for (int s = 0; s < SETS; s++) valid[s] <= '0;
      fwd_v <= 1'b0;
    end else begin
      fwd_v <= wr_en;
      if (wr_en) begin
        valid[wr_idx][wr_way] <= 1'b1;
        if (wr_way == rr[wr_idx]) rr[wr_idx] <= rr[wr_idx] + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) begin
      fwd_idx <= wr_idx;
      fwd_way <= wr_way;
      fwd_e   <= '{key: wr_key, port: wr_port};
    end
  end

  // compare
  always_comb begin
    entry_t          e;
    logic            found_inv;
    logic [WAYS-1:0] vset;
    hit       = 1'b0;
    hit_way   = '0;
    hit_port  = '0;
    found_inv = 1'b0;
    victim    = rr[cmp_idx];
    vset      = valid[cmp_idx];
    for (int w = 0; w < WAYS; w++) begin
      e = (fwd_v && fwd_idx == cmp_idx && fwd_way == WY_W'(w)) ? fwd_e : rdata[w];
      if (vset[w] && e.key == cmp_key && !hit) begin
        hit      = 1'b1;
        hit_way  = WY_W'(w);
        hit_port = e.port;
      end
      if (!vset[w] && !found_inv) begin
        found_inv = 1'b1;
        victim    = WY_W'(w);
      end
    end
  end

endmodule
