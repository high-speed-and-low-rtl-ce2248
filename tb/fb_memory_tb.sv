// fb_memory_tb: checks that the feedback buffer returns every word exactly
// DEPTH enabled cycles after it was written, with random enable gaps, for
// two depths (5 and 1).
module fb_memory_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic       en5, en1;
  logic [7:0] wr5, rd5, wr1, rd1;

  fb_memory #(.DEPTH(5), .WIDTH(8)) u5 (.clk, .rst_n, .en(en5), .wr_data(wr5), .rd_data(rd5));
  fb_memory #(.DEPTH(1), .WIDTH(8)) u1 (.clk, .rst_n, .en(en1), .wr_data(wr1), .rd_data(rd1));

  logic [7:0] hist5 [$], hist1 [$];

  initial begin
    en5 = 0; en1 = 0; wr5 = 0; wr1 = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      en5 = ($urandom_range(4) != 0);
      en1 = ($urandom_range(4) != 0);
      wr5 = 8'($urandom);
      wr1 = 8'($urandom);
      #1;
      if (en5) begin
        if (hist5.size() == 5) begin
          checks++;
          if (rd5 !== hist5[0]) begin
            failures++;
            if (failures < 10) $display("depth 5: read %h want %h", rd5, hist5[0]);
          end
          void'(hist5.pop_front());
        end
        hist5.push_back(wr5);
      end
      if (en1) begin
        if (hist1.size() == 1) begin
          checks++;
          if (rd1 !== hist1[0]) begin
            failures++;
            if (failures < 10) $display("depth 1: read %h want %h", rd1, hist1[0]);
          end
          void'(hist1.pop_front());
        end
        hist1.push_back(wr1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
