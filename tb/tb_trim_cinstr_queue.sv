// tb_trim_cinstr_queue: the C-instr FIFO against a queue model, with random push
// and pop (never into a full or out of an empty FIFO), checking order, data,
// count, full and empty every cycle and that it holds exactly DEPTH entries.
module tb_trim_cinstr_queue;
  import trim_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push, pop, empty, full;
  logic [CI_W-1:0] din, dout;
  logic [3:0] cnt;
  logic [CI_W-1:0] m [$];

  trim_cinstr_queue dut (.clk, .rst_n, .push_i(push), .din_i(din), .pop_i(pop), .dout_o(dout),
                         .empty_o(empty), .full_o(full), .count_o(cnt));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int max_seen = 0;
    push = 0; pop = 0; din = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      checks++;
      if (cnt != m.size() || empty != (m.size() == 0) || full != (m.size() == 8) ||
          (m.size() > 0 && dout !== m[0])) begin
        failures++;
        if (failures < 5) $display("t=%0d count %0d/%0d", t, cnt, m.size());
      end
      if (m.size() > max_seen) max_seen = m.size();
      push = !full && ($urandom_range(0, 99) < ((t / 2000) % 2 ? 70 : 35));
      pop  = !empty && ($urandom_range(0, 99) < ((t / 2000) % 2 ? 35 : 70));
      din  = {$urandom, $urandom, $urandom};
      @(posedge clk);
      if (pop) void'(m.pop_front());
      if (push) m.push_back(din);
    end
    checks++;
    if (max_seen != 8) begin failures++; $display("never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
