// Self-checking testbench of pipeline_latch (9 bits). The clear must zero the
// word; a rising edge of done, and data changes while done is high or low,
// must leave the word alone; the falling edge of done must load the data
// present at that moment. Data are random; the expected word is a copy kept
// by the testbench.
`timescale 1ps/1ps
module tb_pipeline_latch;
  localparam int unsigned N = 9;

  logic rst_n, done;
  logic [N-1:0] d, q, model;
  int checks = 0, failures = 0;

  pipeline_latch #(.N(N)) dut (.rst_n(rst_n), .done(done), .d(d), .q(q));

  initial begin
    #(10_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_q(input string what);
    checks++;
    if (q !== model) begin
      failures++;
      if (failures < 10) $display("%s: q=%h expected %h", what, q, model);
    end
  endtask

  initial begin
    done = 1'b0; d = N'($urandom); rst_n = 1'b0;
    #10; model = '0;
    check_q("clear");
    rst_n = 1'b1;
    #10;
    for (int i = 0; i < 500; i++) begin
      d = N'($urandom);
      #20; check_q("data change, done low");
      done = 1'b1;
      #20; check_q("rising edge of done");
      d = N'($urandom);
      #20; check_q("data change, done high");
      done = 1'b0; model = d;
      #20; check_q("falling edge of done");
      if (i % 100 == 99) begin
        rst_n = 1'b0; model = '0;
        #10; check_q("clear");
        rst_n = 1'b1;
        #10;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
