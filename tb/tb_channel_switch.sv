// tb_channel_switch: random Campbell values around VMIN/VMAX compared with a
// model of the switching flow (above VMAX -> Campbell, at or below VMIN ->
// pulse, between -> keep the previous choice).
module tb_channel_switch;
  logic clk = 0, rst = 1, evaluate = 0, use_camp;
  logic [23:0] camp = 0, vmin = 24'd1000, vmax = 24'd5000;
  int checks = 0, failures = 0, sw_up = 0, sw_down = 0, held = 0;
  logic model = 0;
  channel_switch #(.W(24)) dut (.clk, .rst, .evaluate, .camp, .vmin, .vmax, .use_camp);
  always #5 clk = ~clk;
  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    if (use_camp !== 1'b0) failures++;
    checks++;
    for (int i = 0; i < 400; i++) begin
      logic [23:0] v;
      int sel;
      sel = $urandom_range(0, 4);
      case (sel)
        0: v = 24'($urandom_range(0, 999));
        1: v = 24'($urandom_range(5001, 9000));
        2: v = (i % 2) ? vmin : vmax;     // the limits themselves
        default: v = 24'($urandom_range(1001, 4999));
      endcase
      camp <= v; evaluate <= 1;
      @(posedge clk);
      evaluate <= 0;
      if (v > vmax) begin if (!model) sw_up++; model = 1; end
      else if (v <= vmin) begin if (model) sw_down++; model = 0; end
      else held++;
      @(posedge clk);
      checks++;
      if (use_camp !== model) begin
        failures++;
        $display("FAIL value %0d: got %0b expected %0b", v, use_camp, model);
      end
      // no evaluate: output must hold
      camp <= 24'd9999;
      @(posedge clk);
      checks++;
      if (use_camp !== model) failures++;
    end
    if (sw_up == 0 || sw_down == 0 || held == 0) failures++;
    $display("switches up=%0d down=%0d held=%0d", sw_up, sw_down, held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
