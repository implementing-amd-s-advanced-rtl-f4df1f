// asf_l1_spec: L1 data-cache tag array extended with the two ASF bits per
// line, the read/write-set store of the cache-based ASF implementation.
//
// Every line carries a speculative-read (sr) and a speculative-write (sw)
// bit next to its tag, valid and dirty bits. An ASF-spec access that hits
// sets sr or sw right at the lookup; a line filled from the miss buffer
// arrives with sr set when the miss buffer still counts an in-flight ASF load
// for it. An ASF load that got its data by store-to-load forwarding never
// looks up the cache, so it is presented on the stlf port: it sets sr on the
// line, or, if the line is absent, installs a monitor-only entry (tag valid,
// no data) so that conflicting probes are still seen.
//
// Probes from other cores: a probe that reads an sw line or writes an sr/sw
// line is a conflict (requester wins). The probed sw line is invalidated in
// the same cycle (partial rollback): the next level still holds its value
// from before the region, because a dirty line is cleaned (wb_req) before its
// first speculative write. The sticky conflict flag goes to the region
// controller. Commit flash-clears sr/sw and drops monitor-only entries;
// rollback additionally invalidates all sw lines. As in the design this
// follows, nothing stops a refill from evicting a protected line: when the
// victim carries sr or sw the sticky capacity flag requests an abort.
//
// Only tags and state are held here; the data array is outside. Lookup and
// probe answers are combinational, state updates take effect on the next
// clock. The geometry (512 sets x 2 ways of 64-byte lines), the victim choice
// and the cleaning write-back are this design's own choices.
module asf_l1_spec
  import asf_pkg::*;
#(
  parameter int unsigned SETS = 512,
  parameter int unsigned WAYS = 2,
  localparam int unsigned SET_W = $clog2(SETS),
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1,
  localparam int unsigned TAG_W = LINE_AW - SET_W
) (
  input  logic       clk,
  input  logic       rst_n,
  // core access (load or store lookup)
  input  logic       acc_valid,
  input  line_addr_t acc_line,
  input  logic       acc_write,
  input  logic       acc_asf,
  output logic       acc_hit,
  output logic       wb_req,        // clean this dirty line before the speculative write
  output line_addr_t wb_line,
  // store-to-load forwarded ASF load
  input  logic       stlf_valid,
  input  line_addr_t stlf_line,
  output logic       stlf_ready,
  // fill from the miss buffer
  input  logic       fill_valid,
  input  line_addr_t fill_line,
  input  logic       fill_spec_r,
  output logic       evict_valid,
  output line_addr_t evict_line,
  output logic       evict_dirty,
  // remote probe
  input  logic       probe_valid,
  input  line_addr_t probe_line,
  input  logic       probe_write,
  output logic       probe_hit,
  output logic       probe_conflict,
  // region control
  input  logic       commit,
  input  logic       rollback,
  output logic       conflict,
  output logic       capacity
);

  // Tag SRAM, one array per way; needs no reset because vld guards it.
  logic [TAG_W-1:0] tag   [WAYS][SETS];
  // State bits, in flip-flops so that commit and rollback can flash-clear them.
  logic [WAYS-1:0]  vld   [SETS];
  logic [WAYS-1:0]  dval  [SETS];   // data present (0: monitor-only entry)
  logic [WAYS-1:0]  dirty [SETS];
  logic [WAYS-1:0]  sr    [SETS];
  logic [WAYS-1:0]  sw    [SETS];
  logic [WAY_W-1:0] mru   [SETS];

  function automatic logic [SET_W-1:0] set_of(input line_addr_t l);
    return l[SET_W-1:0];
  endfunction
  function automatic logic [TAG_W-1:0] tag_of(input line_addr_t l);
    return l[LINE_AW-1:SET_W];
  endfunction

  // ---- access lookup
  logic [SET_W-1:0] a_set;
  logic             a_tag_hit;
  logic [WAY_W-1:0] a_way;
  always_comb begin
    a_set = set_of(acc_line); a_tag_hit = 1'b0; a_way = '0;
    for (int w = 0; w < WAYS; w++)
      if (vld[a_set][w] && dval[a_set][w] && tag[w][a_set] == tag_of(acc_line)) begin
        a_tag_hit = 1'b1; a_way = WAY_W'(w);
      end
  end
  assign acc_hit = acc_valid && a_tag_hit;
  assign wb_req  = acc_hit && acc_asf && acc_write && dirty[a_set][a_way] && !sw[a_set][a_way];
  assign wb_line = acc_line;

  // ---- allocation port: fill has priority over store-to-load forwarding
  assign stlf_ready = !fill_valid;
  wire        al_valid = fill_valid || stlf_valid;
  wire        al_stlf  = !fill_valid;
  line_addr_t al_line;
  assign al_line = fill_valid ? fill_line : stlf_line;
  logic [SET_W-1:0] al_set;
  logic             al_present, al_free, al_clean;
  logic [WAY_W-1:0] al_pway, al_fway, al_cway, al_way;
  always_comb begin
    al_set = set_of(al_line);
    al_present = 1'b0; al_free = 1'b0; al_clean = 1'b0;
    al_pway = '0; al_fway = '0; al_cway = '0;
    for (int w = WAYS-1; w >= 0; w--) begin
      if (vld[al_set][w] && tag[w][al_set] == tag_of(al_line)) begin al_present = 1'b1; al_pway = WAY_W'(w); end
      if (!vld[al_set][w]) begin al_free = 1'b1; al_fway = WAY_W'(w); end
    end
    // a way without ASF bits, preferring one that is not most recently used
    for (int w = WAYS-1; w >= 0; w--)
      if (!sr[al_set][w] && !sw[al_set][w] && (!al_clean || WAY_W'(w) != mru[al_set])) begin
        al_clean = 1'b1; al_cway = WAY_W'(w);
      end
    if (al_present)    al_way = al_pway;
    else if (al_free)  al_way = al_fway;
    else if (al_clean) al_way = al_cway;
    else               al_way = (mru[al_set] == '0) ? WAY_W'(WAYS-1) : '0;
  end
  wire al_evict = al_valid && !al_present && !al_free;
  assign evict_valid = al_evict;
  assign evict_line  = {tag[al_way][al_set], al_set};
  assign evict_dirty = dirty[al_set][al_way] && dval[al_set][al_way];
  wire al_evict_prot = al_evict && (sr[al_set][al_way] || sw[al_set][al_way]);

  // ---- probe
  logic [SET_W-1:0] p_set;
  logic [WAY_W-1:0] p_way;
  always_comb begin
    p_set = set_of(probe_line); probe_hit = 1'b0; p_way = '0;
    for (int w = 0; w < WAYS; w++)
      if (probe_valid && vld[p_set][w] && tag[w][p_set] == tag_of(probe_line)) begin
        probe_hit = 1'b1; p_way = WAY_W'(w);
      end
  end
  assign probe_conflict = probe_hit && (sw[p_set][p_way] || (probe_write && sr[p_set][p_way]));

  // tag write on allocation
  for (genvar w = 0; w < WAYS; w++) begin : g_tag
    always_ff @(posedge clk) begin
      if (al_valid && al_way == WAY_W'(w)) tag[w][al_set] <= tag_of(al_line);
    end
  end

  // per-set state update
  wire probe_kill = probe_hit && (probe_write || sw[p_set][p_way]);
  for (genvar gs = 0; gs < SETS; gs++) begin : g_set
    wire a_here  = acc_hit    && a_set  == SET_W'(gs);
    wire al_here = al_valid   && al_set == SET_W'(gs);
    wire p_here  = probe_kill && p_set  == SET_W'(gs);
    logic [WAYS-1:0]  v, d, dt, r, wr;
    logic [WAY_W-1:0] m;
    always_comb begin
      v = vld[gs]; d = dval[gs]; dt = dirty[gs]; r = sr[gs]; wr = sw[gs]; m = mru[gs];
      // core access
      if (a_here) begin
        m = a_way;
        if (acc_write)             dt[a_way] = 1'b1;
        if (acc_asf && acc_write)  wr[a_way] = 1'b1;
        if (acc_asf && !acc_write) r[a_way]  = 1'b1;
      end
      // fill or monitor entry
      if (al_here) begin
        v[al_way] = 1'b1;
        m         = al_way;
        if (al_stlf) begin
          r[al_way] = 1'b1;
          if (!al_present) begin d[al_way] = 1'b0; dt[al_way] = 1'b0; wr[al_way] = 1'b0; end
        end else begin
          d[al_way] = 1'b1;
          if (!al_present) begin
            dt[al_way] = 1'b0; wr[al_way] = 1'b0; r[al_way] = fill_spec_r;
          end else if (fill_spec_r) begin
            r[al_way] = 1'b1;
          end
        end
      end
      // probe: partial rollback of a speculatively written line, or plain
      // invalidation by a remote write
      if (p_here) begin
        v[p_way] = 1'b0; r[p_way] = 1'b0; wr[p_way] = 1'b0;
      end
      // end of region: drop monitor-only entries, and on rollback also
      // every speculatively written line
      if (commit || rollback) begin
        v  = v & d & (rollback ? ~wr : '1);
        r  = '0;
        wr = '0;
      end
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        vld[gs] <= '0; dval[gs] <= '0; dirty[gs] <= '0; sr[gs] <= '0; sw[gs] <= '0; mru[gs] <= '0;
      end else begin
        vld[gs] <= v; dval[gs] <= d; dirty[gs] <= dt; sr[gs] <= r; sw[gs] <= wr; mru[gs] <= m;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      conflict <= 1'b0;
      capacity <= 1'b0;
    end else if (commit || rollback) begin
      conflict <= 1'b0;
      capacity <= 1'b0;
    end else begin
      if (al_evict_prot)  capacity <= 1'b1;
      if (probe_conflict) conflict <= 1'b1;
    end
  end

endmodule
