// quad_encoder: decoder for the motor's relative quadrature encoder (channels A and B).
//
// Both channels are synchronised to the clock with two flip-flops. Every edge of either
// channel moves the 12-bit position counter by one count (x4 decoding): up when A leads B
// (A,B = 00 -> 10 -> 11 -> 01 -> 00), down in the opposite order. The counter wraps modulo
// 4096, so it is a relative mechanical angle of 4096 counts per turn when the encoder gives
// 1024 lines per revolution; the index channel Z is not used, as in the reference design.
// A transition in which both channels change at once cannot be decoded; it is ignored and
// counted in `err_cnt`. Timing: a count appears three cycles after the encoder edge.
// The decoding scheme, the synchroniser and the error counter are this implementation's.
module quad_encoder
  import foc_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   quad_a,
  input  logic   quad_b,
  output angle_t counter_value,
  output logic   dir,             // 1: last step counted up
  output logic [7:0] err_cnt
);
  logic [1:0] a_sync, b_sync;
  logic [1:0] prev, cur;

  assign cur = {a_sync[1], b_sync[1]};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_sync        <= '0;
      b_sync        <= '0;
      prev          <= '0;
      counter_value <= '0;
      dir           <= 1'b1;
      err_cnt       <= '0;
    end else begin
      a_sync <= {a_sync[0], quad_a};
      b_sync <= {b_sync[0], quad_b};
      prev   <= cur;
      case ({prev, cur})
        4'b00_10, 4'b10_11, 4'b11_01, 4'b01_00: begin
          counter_value <= counter_value + 1'b1;
          dir           <= 1'b1;
        end
        4'b00_01, 4'b01_11, 4'b11_10, 4'b10_00: begin
          counter_value <= counter_value - 1'b1;
          dir           <= 1'b0;
        end
        4'b00_11, 4'b11_00, 4'b01_10, 4'b10_01:
          if (err_cnt != 8'hFF) err_cnt <= err_cnt + 1'b1;
        default: ;
      endcase
    end
  end
endmodule
