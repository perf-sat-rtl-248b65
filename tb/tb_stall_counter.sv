// tb_stall_counter -- self-checking test of the stalled cycle accumulator.
// Drives random scoreboard/pipeline stall flags and random window lengths,
// keeps its own count and compares every delivered sample; also checks the
// one-cycle sample_valid latency and saturation at a narrow width.
module tb_stall_counter;
  logic clk = 1'b0, rst_n = 1'b0;
  logic clear, sb, pipe, send;
  logic [15:0] sample, running;
  logic        sample_valid;
  logic [7:0]  s8, r8;
  logic        v8;
  int checks = 0, failures = 0;
  int model, model8, pending, pending8;
  bit expect_valid;

  always #5 clk = ~clk;

  stall_counter #(.CNT_W(16)) dut (.clk, .rst_n, .clear, .sb_stall(sb), .pipe_stall(pipe),
    .sample_end(send), .sample, .sample_valid, .running);
  stall_counter #(.CNT_W(8)) dut8 (.clk, .rst_n, .clear, .sb_stall(sb), .pipe_stall(pipe),
    .sample_end(send), .sample(s8), .sample_valid(v8), .running(r8));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 0; sb = 0; pipe = 0; send = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // open the first window
    sb = $urandom_range(0, 1); pipe = $urandom_range(0, 1); clear = 1;
    model = int'(sb) + int'(pipe);
    model8 = model;
    @(negedge clk); clear = 0;
    for (int w = 0; w < 60; w++) begin
      int len;
      len = (w < 50) ? $urandom_range(1, 40) : $urandom_range(150, 300);
      for (int c = 0; c < len; c++) begin
        sb = $urandom_range(0, 1); pipe = $urandom_range(0, 1);
        send = (c == len - 1);
        model += int'(sb) + int'(pipe);
        model8 += int'(sb) + int'(pipe);
        if (model8 > 255) model8 = 255;
        @(posedge clk);
        #1;
        if (send) begin
          checks++;
          if (!sample_valid || sample != 16'(model)) begin
            failures++;
            $display("FAIL window %0d: sample=%0d valid=%0b expected %0d", w, sample, sample_valid, model);
          end
          checks++;
          if (!v8 || s8 != 8'(model8)) begin
            failures++;
            $display("FAIL 8-bit window %0d: sample=%0d expected %0d", w, s8, model8);
          end
          model = 0; model8 = 0;
        end else begin
          checks++;
          if (sample_valid) begin
            failures++;
            $display("FAIL spurious sample_valid");
          end
        end
        @(negedge clk);
      end
    end
    send = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
