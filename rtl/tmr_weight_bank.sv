// Long-term storage for configuration words (network weights, biases, output
// selection), with triplicated registers, logic and clocks and automatic
// correction of single upsets.
//
// There are three copies A, B and C of every word, each clocked by its own
// clock. Each copy has its own next-state logic: it keeps its word, or takes
// wdata when we is set and waddr names the word. Each copy then loads the
// bitwise majority of the three copies' next values, through a voter of its
// own. An upset in one copy is therefore outvoted and repaired at the next
// edge of that copy's clock, while the voted contents q never change. This
// scheme follows the design's treatment of long-term weight storage; the word
// array organisation, the single write port, the read port and the
// asynchronous active-low reset to zero are this implementation's choice.
//
// Timing: a write takes effect at the next clock edge (q and rdata show it
// one cycle later). rdata is combinational from raddr. The three clocks are
// meant to be one clock distributed by three separate trees.
module tmr_weight_bank #(
  parameter int unsigned DEPTH = 2144,
  parameter int unsigned WIDTH = 6,
  parameter int unsigned AW    = 12
) (
  input  logic             clk_a,
  input  logic             clk_b,
  input  logic             clk_c,
  input  logic             rst_n,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata,
  output logic [WIDTH-1:0] q [DEPTH]
);

  logic [WIDTH-1:0] mem_a [DEPTH];
  logic [WIDTH-1:0] mem_b [DEPTH];
  logic [WIDTH-1:0] mem_c [DEPTH];
  logic [WIDTH-1:0] nxt_a [DEPTH];
  logic [WIDTH-1:0] nxt_b [DEPTH];
  logic [WIDTH-1:0] nxt_c [DEPTH];
  logic [WIDTH-1:0] vot_a [DEPTH];
  logic [WIDTH-1:0] vot_b [DEPTH];
  logic [WIDTH-1:0] vot_c [DEPTH];

  function automatic logic [WIDTH-1:0] maj(input logic [WIDTH-1:0] x,
                                           input logic [WIDTH-1:0] y,
                                           input logic [WIDTH-1:0] z);
    return (x & y) | (x & z) | (y & z);
  endfunction

  // Per-copy next-state logic
  always_comb begin
    for (int i = 0; i < DEPTH; i++) begin
      nxt_a[i] = (we && waddr == AW'(i)) ? wdata : mem_a[i];
      nxt_b[i] = (we && waddr == AW'(i)) ? wdata : mem_b[i];
      nxt_c[i] = (we && waddr == AW'(i)) ? wdata : mem_c[i];
    end
  end

  // Per-copy voters
  always_comb begin
    for (int i = 0; i < DEPTH; i++) begin
      vot_a[i] = maj(nxt_a[i], nxt_b[i], nxt_c[i]);
      vot_b[i] = maj(nxt_a[i], nxt_b[i], nxt_c[i]);
      vot_c[i] = maj(nxt_a[i], nxt_b[i], nxt_c[i]);
    end
  end

  always_ff @(posedge clk_a or negedge rst_n) begin
    if (!rst_n) for (int i = 0; i < DEPTH; i++) mem_a[i] <= '0;
    else        for (int i = 0; i < DEPTH; i++) mem_a[i] <= vot_a[i];
  end

  always_ff @(posedge clk_b or negedge rst_n) begin
    if (!rst_n) for (int i = 0; i < DEPTH; i++) mem_b[i] <= '0;
    else        for (int i = 0; i < DEPTH; i++) mem_b[i] <= vot_b[i];
  end

  always_ff @(posedge clk_c or negedge rst_n) begin
    if (!rst_n) for (int i = 0; i < DEPTH; i++) mem_c[i] <= '0;
    else        for (int i = 0; i < DEPTH; i++) mem_c[i] <= vot_c[i];
  end

  // Voted view of the stored words
  always_comb begin
    for (int i = 0; i < DEPTH; i++) q[i] = maj(mem_a[i], mem_b[i], mem_c[i]);
  end

  assign rdata = (raddr < AW'(DEPTH)) ? q[raddr] : '0;

endmodule
