// emd_select: selection unit of the early mode decision. It receives the
// Hadamard costs of the 19 prediction units for the two passes of a block
// (pass 0: modes 2..18, planar, DC; pass 1: modes 34..19) and returns the
// mode with the lowest cost.
//
// Each cost set is reduced by a combinational minimum over the valid units;
// the pass-0 winner is held in a register and compared with the pass-1
// winner. Ties go to the lower unit number, pass 0 first.
// Interface: cost_valid with cost_pass and 19 costs/valid flags, one set per
// pass; best_valid pulses one cycle after the pass-1 set with best_mode
// (0 planar, 1 DC, 2..34 angular) and best_cost.
module emd_select
  import hevc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cost_valid,
  input  logic        cost_pass,
  input  logic [17:0] cost    [19],
  input  logic        cost_ok [19],
  output logic        best_valid,
  output logic [5:0]  best_mode,
  output logic [17:0] best_cost
);
  function automatic logic [5:0] unit_mode(input int u, input logic p);
    if (p) return 6'(34 - u);
    if (u == 17) return 6'd0;
    if (u == 18) return 6'd1;
    return 6'(2 + u);
  endfunction

  logic [5:0]  min_mode;
  logic [17:0] min_cost;
  logic        min_any;
  always_comb begin
    min_mode = '0;
    min_cost = '1;
    min_any  = 1'b0;
    for (int u = 0; u < 19; u++)
      if (cost_ok[u] && (!min_any || cost[u] < min_cost)) begin
        min_any  = 1'b1;
        min_cost = cost[u];
        min_mode = unit_mode(u, cost_pass);
      end
  end

  logic [5:0]  p0_mode;
  logic [17:0] p0_cost;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      best_valid <= 1'b0;
      p0_cost    <= '1;
      p0_mode    <= '0;
    end else begin
      best_valid <= 1'b0;
      if (cost_valid && !cost_pass) begin
        p0_mode <= min_mode;
        p0_cost <= min_cost;
      end
      if (cost_valid && cost_pass) begin
        best_valid <= 1'b1;
        if (min_any && min_cost < p0_cost) begin
          best_mode <= min_mode;
          best_cost <= min_cost;
        end else begin
          best_mode <= p0_mode;
          best_cost <= p0_cost;
        end
      end
    end
  end
endmodule
