// tb_history_buffer: random commit and temporary writes against a queue model. A commit
// after temporary writes must replace the temporary entry, not add a second one; the
// count must saturate at HL and the oldest entries fall off. Run with HL = 8 and with
// the default HL = 50.
module tb_history_buffer;
  import psp_pkg::*;

  localparam int unsigned HL = 8;

  logic   clk = 0, rst_n = 0;
  logic   commit = 0, temp_wr = 0;
  level_t wr_level = '0;
  level_t hist  [HL];
  level_t hist50 [50];
  logic [$clog2(HL+1)-1:0] count;
  logic [$clog2(51)-1:0]   count50;
  logic temp, temp50;
  int checks = 0, failures = 0;

  history_buffer #(.HL(HL)) dut (.clk, .rst_n, .commit, .temp_wr, .wr_level,
                                 .hist, .count, .temp);
  history_buffer dut50 (.clk, .rst_n, .commit, .temp_wr, .wr_level,
                        .hist(hist50), .count(count50), .temp(temp50));

  always #5 clk = ~clk;

  level_t model [$];   // newest first
  logic   mtemp;

  task automatic compare();
    checks++;
    if (32'(count) != ((model.size() > HL) ? HL : model.size()) || temp != mtemp) begin
      failures++; $display("FAIL count=%0d temp=%0b model=%0d/%0b", count, temp, model.size(), mtemp);
    end
    for (int i = 0; i < HL && i < model.size(); i++) begin
      checks++;
      if (hist[i] != model[i]) begin
        failures++; $display("FAIL hist[%0d]=%0d expected %0d", i, hist[i], model[i]);
      end
    end
    for (int i = 0; i < 50 && i < model.size(); i++) begin
      checks++;
      if (hist50[i] != model[i]) begin
        failures++; $display("FAIL hist50[%0d]=%0d expected %0d", i, hist50[i], model[i]);
      end
    end
    checks++;
    if (32'(count50) != ((model.size() > 50) ? 50 : model.size()) || temp50 != mtemp) begin
      failures++; $display("FAIL count50=%0d", count50);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int op;
    mtemp = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    compare();
    for (int n = 0; n < 3000; n++) begin
      op = $urandom_range(0, 3);
      wr_level <= level_t'($urandom_range(1, 7));
      commit   <= (op == 1);
      temp_wr  <= (op == 2 || op == 3);
      @(posedge clk);
      if (commit || temp_wr) begin
        if (mtemp) model[0] = wr_level;
        else       model.push_front(wr_level);
        mtemp = !commit;
      end
      if (model.size() > 60) void'(model.pop_back());
      commit  <= 0;
      temp_wr <= 0;
      @(negedge clk);
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
