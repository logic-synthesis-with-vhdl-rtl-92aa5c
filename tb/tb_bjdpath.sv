// tb_bjdpath: drives the dealer datapath with random operand selects, loads,
// clears and cards and compares score, acecard and the two comparator
// outputs with a model kept as a plain integer modulo 32.
module tb_bjdpath;
  logic       clk = 0, reset_b = 0, load = 0, clear_b = 1;
  logic [1:0] sel = '0;
  logic [3:0] card = '0;
  logic       acecard, score16gt, score21gt;
  logic [4:0] score;
  int checks = 0, failures = 0;
  int model = 0;

  bjdpath dut (.clk, .reset_b, .load, .clear_b, .sel, .card, .acecard,
               .score16gt, .score21gt, .score);

  always #5 clk = ~clk;

  task automatic compare(input string what);
    checks++;
    if (score !== 5'(model) || acecard !== (card == 4'd1) ||
        score16gt !== (model > 16) || score21gt !== (model > 21)) begin
      failures++;
      $display("FAIL %s: score=%0d model=%0d card=%0d ace=%b gt16=%b gt21=%b",
               what, score, model, card, acecard, score16gt, score21gt);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int operand;
    repeat (2) @(posedge clk);
    compare("reset");
    @(negedge clk) reset_b = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      sel     = 2'($urandom);
      card    = 4'($urandom);
      load    = ($urandom % 3) != 0;
      clear_b = ($urandom % 10) != 0;
      // directed: hold the score near the comparator thresholds
      if (i % 50 == 10) begin clear_b = 0; end
      case (sel)
        2'b00:   operand = 10;
        2'b10:   operand = -10;
        default: operand = card;
      endcase
      #1 compare("comb");
      @(posedge clk);
      if (!clear_b)  model = 0;
      else if (load) model = (model + operand) & 31;
      #1 compare("after edge");
    end
    // the comparator thresholds exactly: clear, add (t - 10), add +10
    foreach (targets[t]) begin
      @(negedge clk) clear_b = 0; load = 0;
      @(posedge clk) model = 0;
      @(negedge clk) clear_b = 1; load = 1; sel = 2'b01; card = 4'(targets[t] - 10);
      @(posedge clk) model = targets[t] - 10;
      @(negedge clk) sel = 2'b00;
      @(posedge clk) model = targets[t];
      @(negedge clk) load = 0; #1 compare("threshold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int targets [4] = '{16, 17, 21, 22};
endmodule
