// edge_table: read-only hash table of the control-flow edges the firmware
// may take.
//
// The offline analysis lists every instrumented edge as a pair (source
// basic-block ID, target basic-block ID); that list becomes the contents of
// this ROM, so one lookup answers in constant time. The pair is combined
// with a cheap, invertible mix:
//
//   h     = src XOR rotate_left(tgt, HASH_ROT)         (ID_W bits)
//   index = h[IDX_W-1:0]                         (IDX_W = log2 DEPTH)
//   tag   = { src, h[ID_W-1:IDX_W] }
//   entry = { valid, tag }
//
// Because index and tag together give back both src and h, and so tgt, a
// hit is exact: no pair outside the list can match. Two listed edges that
// share an index cannot both be stored; the offline tool assigns the IDs so
// that this does not happen. The ROM is a table lookup in O(1) as the
// published scheme asks; the particular mix, the tag and the collision
// rule are this design's choice.
//
// Contents come from INIT_FILE ($readmemh, one hex entry per line, "@index"
// lines allowed, so a sparse list is enough); entries not named are invalid.
//
// Timing: present src/tgt with lookup high; hit/miss is valid (done high)
// after the next clock edge. A new lookup may start every cycle.
module edge_table #(
  parameter int unsigned ID_W       = 16,
  parameter int unsigned DEPTH      = 8192,
  parameter int unsigned HASH_ROT   = 7,
  parameter string       INIT_FILE  = "rtl/cfi_edges.hex"
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            lookup,
  input  logic [ID_W-1:0] src,
  input  logic [ID_W-1:0] tgt,
  output logic            done,
  output logic            hit
);

  localparam int unsigned IDX_W   = $clog2(DEPTH);
  localparam int unsigned REST_W  = ID_W - IDX_W;      // bits of h above the index
  localparam int unsigned TAG_W   = ID_W + REST_W;
  localparam int unsigned ENTRY_W = TAG_W + 1;

  initial begin
    assert (IDX_W < ID_W) else $error("edge_table: DEPTH needs IDX_W < ID_W");
  end

  logic [ENTRY_W-1:0] rom [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) rom[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, rom);
  end

  logic [ID_W-1:0]    tgt_rot, h;
  logic [IDX_W-1:0]   index;
  logic [TAG_W-1:0]   tag;

  always_comb begin
    tgt_rot = (tgt << HASH_ROT) | (tgt >> (ID_W - HASH_ROT));
    h       = src ^ tgt_rot;
    index   = h[IDX_W-1:0];
    tag     = {src, h[ID_W-1:IDX_W]};
  end

  logic [ENTRY_W-1:0] entry_q;
  logic [TAG_W-1:0]   tag_q;

  always_ff @(posedge clk) begin
    if (lookup) begin
      entry_q <= rom[index];
      tag_q   <= tag;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) done <= 1'b0;
    else        done <= lookup;
  end

  assign hit = entry_q[ENTRY_W-1] && (entry_q[TAG_W-1:0] == tag_q);

endmodule
