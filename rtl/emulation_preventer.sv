// emulation_preventer: inserts an emulation prevention byte (0x03) into the
// coded byte stream wherever two zero bytes are followed by a byte of value
// 0..3, so that no start code prefix appears inside a NAL unit payload.
// Interface: in_valid/in_ready/in_byte/in_last in, out_valid/out_ready/
// out_byte/out_last out. A byte is held in one output register; when an
// insertion is needed the 0x03 goes out first and the held byte the cycle
// after, so the input stalls for one cycle per inserted byte. in_last
// resets the zero counter for the next NAL unit.
// The rule is the standard's; the one-register structure is this design's.
module emulation_preventer (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic [7:0] in_byte,
  input  logic       in_last,
  output logic       out_valid,
  input  logic       out_ready,
  output logic [7:0] out_byte,
  output logic       out_last,
  output logic       inserted
);
  logic [1:0] zeros;       // zero bytes sent in a row (saturating at 2)
  logic       hold;        // in_byte accepted, waiting behind an inserted 0x03
  logic [7:0] hold_byte;
  logic       hold_last;
  logic       need;

  assign need     = in_valid && zeros == 2'd2 && in_byte <= 8'd3;
  assign in_ready = !hold && (!out_valid || out_ready);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      zeros <= '0; hold <= 1'b0; out_valid <= 1'b0; out_last <= 1'b0; inserted <= 1'b0;
      out_byte <= '0; hold_byte <= '0; hold_last <= 1'b0;
    end else begin
      inserted <= 1'b0;
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (!out_valid || out_ready) begin
        if (hold) begin
          out_valid <= 1'b1; out_byte <= hold_byte; out_last <= hold_last; hold <= 1'b0;
          zeros <= hold_last ? 2'd0 : (hold_byte == 8'd0) ? 2'd1 : 2'd0;
        end else if (in_valid) begin
          out_valid <= 1'b1;
          if (need) begin
            out_byte <= 8'h03; out_last <= 1'b0; inserted <= 1'b1;
            hold <= 1'b1; hold_byte <= in_byte; hold_last <= in_last;
            zeros <= '0;
          end else begin
            out_byte <= in_byte; out_last <= in_last;
            zeros <= in_last ? 2'd0 : (in_byte != 8'd0) ? 2'd0 : (zeros == 2'd2) ? 2'd2 : zeros + 2'd1;
          end
        end
      end
    end
  end

  a_hold_after_insert: assert property (@(posedge clk) disable iff (!rst_n)
    inserted |-> hold && out_byte == 8'h03);
endmodule
