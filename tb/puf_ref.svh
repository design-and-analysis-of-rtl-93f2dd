// puf_ref.svh - reference model shared by the PUF test benches.
//
// Walks the two racing edges through a chain stage by stage and returns the arrival times at
// the final arbiter, the feed-forward decisions and the response, using the same per-MUX delay
// values the design draws from puf_pkg (those delays are the "silicon"; the routing, skipping,
// feed-forward and arbitration are worked out here independently of the RTL).
// Response convention: 1 when the bottom edge arrives strictly first; an exact tie is flagged.
// t0_top/t0_bot are the launch times of the two edges (equal for the usual shared edge).
// 'late' flags a feed-forward decision taken after an edge has already reached its block.

localparam int unsigned REF_MAXN = 128;

typedef struct packed {
  bit          resp;
  bit [1:0]    ff;
  bit          tie;
  bit          late;
  int unsigned t_top;
  int unsigned t_bot;
} ref_result_t;

function automatic ref_result_t ref_eval(
  input int unsigned         n,
  input int unsigned         seed,
  input logic [REF_MAXN-1:0] ch,
  input logic [REF_MAXN-1:0] skp,
  input bit                  has_skip,
  input int unsigned         nloops,
  input int unsigned         tap0, input int unsigned dst0,
  input int unsigned         tap1, input int unsigned dst1,
  input int unsigned         len,
  input int unsigned         t0_top = 0,
  input int unsigned         t0_bot = 0
);
  ref_result_t r;
  int unsigned tt, tb, nt, nb;
  int unsigned ff_time [2];
  bit          s;
  r = '0;
  tt = t0_top;
  tb = t0_bot;
  ff_time[0] = 0;
  ff_time[1] = 0;
  for (int unsigned i = 0; i < n; i++) begin
    s = ch[i];
    if (nloops > 0 && i >= dst0 && i < dst0 + len) begin
      s = r.ff[0];
      if (ff_time[0] > tt || ff_time[0] > tb) r.late = 1'b1;
    end
    if (nloops > 1 && i >= dst1 && i < dst1 + len) begin
      s = r.ff[1];
      if (ff_time[1] > tt || ff_time[1] > tb) r.late = 1'b1;
    end
    if (has_skip && skp[i]) begin
      nt = tt;
      nb = tb;
    end else begin
      nt = (s ? tb : tt) + puf_pkg::mux_delay_ps(seed, i, puf_pkg::EL_TOP);
      nb = (s ? tt : tb) + puf_pkg::mux_delay_ps(seed, i, puf_pkg::EL_BOT);
    end
    if (has_skip) begin
      nt += puf_pkg::mux_delay_ps(seed, i, puf_pkg::EL_MERGE_TOP);
      nb += puf_pkg::mux_delay_ps(seed, i, puf_pkg::EL_MERGE_BOT);
    end
    tt = nt;
    tb = nb;
    if (nloops > 0 && i == tap0) begin
      r.ff[0] = (tb < tt);
      ff_time[0] = tt;
      if (tb == tt) r.tie = 1'b1;
    end
    if (nloops > 1 && i == tap1) begin
      r.ff[1] = (tb < tt);
      ff_time[1] = tt;
      if (tb == tt) r.tie = 1'b1;
    end
  end
  r.resp  = (tb < tt);
  if (tb == tt) r.tie = 1'b1;
  r.t_top = tt;
  r.t_bot = tb;
  return r;
endfunction

function automatic logic [REF_MAXN-1:0] rand_vec();
  return {$urandom(), $urandom(), $urandom(), $urandom()};
endfunction
