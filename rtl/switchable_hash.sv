// switchable_hash: the hash function block of the routing computation unit.
//
// Four datapaths work in parallel on the packet's destination address: the
// k-ary n-cube hash, the fat-tree/Dragonfly hash, the CRC hash for arbitrary
// topologies and the link-aggregation (LAG) hash. cfg.mode, written by the
// switch's manager before a job, picks which topology datapath forms the key;
// the LAG member is always appended. Output:
//   key = {mode, lag member, payload}
//     k-ary n-cube : payload = 6-bit tag {dim, dir} (or the local node)
//     fat tree     : payload = {up/down, j}
//     arbitrary    : payload = the destination address
//   idx = the cache set for key (pfc_pkg::key_index).
// Destinations that share an output link share one key, which is what lets
// the whole routing state of a switch fit in a few cache entries.
// Purely combinational; the routing computation unit registers its output.
module switchable_hash
  import pfc_pkg::*;
(
  input  hash_cfg_t          cfg,
  input  logic [ADDR_W-1:0]  dst,
  output cache_key_t         key,
  output logic [IDX_W-1:0]   idx
);

  logic [5:0]       kary_tag;
  logic             ft_up;
  logic [7:0]       ft_j;
  logic [IDX_W-1:0] arb_idx;
  logic [LAG_W-1:0] member;

  kary_ncube_hash u_kary (
    .shape (cfg.kary_shape),
    .k     (cfg.kary_k),
    .cur   (cfg.kary_cur),
    .dst   (dst),
    .tag   (kary_tag)
  );

  fattree_hash u_ftree (
    .bits  (cfg.ft_bits),
    .n     (cfg.ft_n),
    .dim   (cfg.ft_dim),
    .cur   (cfg.ft_cur),
    .dst   (dst),
    .up    (ft_up),
    .j     (ft_j)
  );

  lag_hash u_lag (
    .dst      (dst),
    .lag_bits (cfg.lag_bits),
    .member   (member)
  );

  arbitrary_hash u_arb (
    .dst (dst),
    .lag (member),
    .idx (arb_idx)
  );

  always_comb begin
    key.mode = cfg.mode;
    key.lag  = member;
    unique case (cfg.mode)
      HASH_KARY:  key.payload = {{(ADDR_W-6){1'b0}}, kary_tag};
      HASH_FTREE: key.payload = {{(ADDR_W-9){1'b0}}, ft_up, ft_j};
      default:    key.payload = dst;
    endcase
    idx = (cfg.mode == HASH_KARY || cfg.mode == HASH_FTREE) ? key_index(key) : arb_idx;
  end

endmodule
