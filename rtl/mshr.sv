// mshr: miss status holding registers of the non-blocking cache, extended
// to cancel false misses.
//
// Each entry holds a valid bit, the missing line address {tag, set} and the
// way picked as victim for the line. Three operations, all looked up
// combinationally and applied on the clock edge:
//   alloc  register a primary miss in the lowest free entry. alloc_ok_o is
//          0 when the line already has an entry (secondary miss, merged:
//          hit_o), when all entries are busy (full_o) or when the same
//          line is being cancelled in this cycle.
//   fill   a line returned by the lower level is looked up; if a valid
//          entry holds it (fill_hit_o, fill_way_o) the entry is freed and
//          the line may be written into the cache; otherwise the fetch was
//          cancelled and the block must be dropped.
//   cancel the correction engine searches a corrected tag; a valid entry
//          holding that line was caused by a false miss and is invalidated
//          (cancel_hit_o, cancel_way_o give the victim way to release).
// Entry count, victim field and the same-cycle alloc/cancel rule are this
// design's choices; the fill and cancel behaviour follows the original scheme.
module mshr #(
  parameter int ENTRIES = cache_pkg::MSHR_ENTRIES,
  parameter int LW      = cache_pkg::TAG_W + $clog2(cache_pkg::SETS),
  parameter int WYW     = $clog2(cache_pkg::WAYS)
) (
  input  logic           clk,
  input  logic           rst_n,
  // allocation
  input  logic           alloc_en_i,
  input  logic [LW-1:0]  alloc_line_i,
  input  logic [WYW-1:0] alloc_way_i,
  output logic           hit_o,
  output logic           full_o,
  output logic           alloc_ok_o,
  // fill
  input  logic           fill_en_i,
  input  logic [LW-1:0]  fill_line_i,
  output logic           fill_hit_o,
  output logic [WYW-1:0] fill_way_o,
  // false-miss cancel
  input  logic           cancel_en_i,
  input  logic [LW-1:0]  cancel_line_i,
  output logic           cancel_hit_o,
  output logic [WYW-1:0] cancel_way_o,
  // status
  output logic [$clog2(ENTRIES+1)-1:0] count_o
);
  typedef struct packed {
    logic           valid;
    logic [LW-1:0]  line;
    logic [WYW-1:0] way;
  } entry_t;

  entry_t ent [ENTRIES];
  logic [ENTRIES-1:0] fill_m, cancel_m;
  logic [$clog2(ENTRIES)-1:0] free_idx;

  always_comb begin
    hit_o        = 1'b0;
    full_o       = 1'b1;
    free_idx     = 0;
    fill_hit_o   = 1'b0;
    fill_way_o   = '0;
    cancel_hit_o = 1'b0;
    cancel_way_o = '0;
    count_o      = '0;
    for (int e = ENTRIES - 1; e >= 0; e--) begin
      if (!ent[e].valid) begin
        full_o   = 1'b0;
        free_idx = $clog2(ENTRIES)'(e);
      end else count_o = count_o + 1'b1;
      if (ent[e].valid && ent[e].line == alloc_line_i) hit_o = 1'b1;
      fill_m[e]   = fill_en_i && ent[e].valid && ent[e].line == fill_line_i;
      cancel_m[e] = cancel_en_i && ent[e].valid && ent[e].line == cancel_line_i;
      if (fill_m[e]) begin
        fill_hit_o = 1'b1;
        fill_way_o = ent[e].way;
      end
      if (cancel_m[e]) begin
        cancel_hit_o = 1'b1;
        cancel_way_o = ent[e].way;
      end
    end
    alloc_ok_o = alloc_en_i && !hit_o && !full_o &&
                 !(cancel_en_i && cancel_line_i == alloc_line_i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < ENTRIES; e++) ent[e] <= '0;
    end else begin
      for (int e = 0; e < ENTRIES; e++) begin
        if (fill_m[e] || cancel_m[e]) ent[e].valid <= 1'b0;
      end
      if (alloc_ok_o) ent[free_idx] <= '{valid: 1'b1, line: alloc_line_i, way: alloc_way_i};
    end
  end

  // A line is never held by two entries.
  a_unique_line: assert property (@(posedge clk) disable iff (!rst_n)
    $countones(fill_m) <= 1 && $countones(cancel_m) <= 1)
    else $error("mshr: duplicate line entries");
endmodule
