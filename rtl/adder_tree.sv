// adder_tree: sum of NIN unsigned W-bit words in ceil(log2 NIN) levels of
// two-input adders.
//
// Level l adds neighbouring pairs of level l-1; an odd word at the end of a
// level passes to the next level unchanged. The sum is WO = W + ceil(log2
// NIN) bits wide, so it never overflows. Used by the reverse converter to
// add the S weighted residue terms.
//
// Timing: PIPE = 0 combinational; PIPE = 1 registers every level, latency
// LEVELS cycles, one sum per cycle. The log-depth tree follows the reference
// converter; passing an odd word through a level, and the plain '+' adders,
// are this implementation's choices.
module adder_tree #(
  parameter int unsigned NIN  = 5,
  parameter int unsigned W    = 40,
  parameter bit          PIPE = 1'b0,
  localparam int unsigned LEVELS = (NIN > 1) ? $clog2(NIN) : 1,
  localparam int unsigned WO     = W + LEVELS
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [NIN-1:0][W-1:0]   in,
  output logic                    out_valid,
  output logic [WO-1:0]           sum
);

  // Number of live words at level l.
  function automatic int unsigned width_at(input int unsigned l);
    int unsigned n;
    n = NIN;
    for (int unsigned k = 0; k < l; k++) n = (n + 1) / 2;
    return n;
  endfunction

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int unsigned NCUR = width_at(l);
    logic [NIN-1:0][WO-1:0] cur, nxt, q;
    logic                   cur_v, q_v;

    if (l == 0) begin : g_first
      always_comb begin
        for (int unsigned j = 0; j < NIN; j++) cur[j] = WO'(in[j]);
      end
      assign cur_v = in_valid;
    end else begin : g_next
      assign cur   = g_level[l-1].q;
      assign cur_v = g_level[l-1].q_v;
    end

    always_comb begin
      for (int unsigned j = 0; j < NIN; j++) begin
        nxt[j] = '0;
        if (2*j + 1 < NCUR)  nxt[j] = cur[2*j] + cur[2*j+1];
        else if (2*j < NCUR) nxt[j] = cur[2*j];
      end
    end

    if (PIPE) begin : g_reg
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          q   <= '0;
          q_v <= 1'b0;
        end else begin
          q   <= nxt;
          q_v <= cur_v;
        end
      end
    end else begin : g_wire
      assign q   = nxt;
      assign q_v = cur_v;
    end
  end

  assign sum       = g_level[LEVELS-1].q[0];
  assign out_valid = g_level[LEVELS-1].q_v;

endmodule
