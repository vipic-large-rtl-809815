// Self-checking testbench of vipic_pixel.
//
// Drives hit pulses, frame edges on tsclk_pix and ack-hit pulses the way the
// sparsifier does, and checks against counts kept by the testbench: the request
// rises only for a frame with hits, data appears only while ack-hit is low, the
// ack-hit rising edge ends the readout one cycle later, a new frame overwrites
// unread data, a hit in the frame-edge cycle counts in the new frame, and the
// counter saturates (a second instance with a 4-bit counter).
module tb_vipic_pixel;
  logic clk = 1'b0, rst_n = 1'b0;
  logic hit, ts, ack;
  logic req, req4;
  logic [19:0] data;
  logic [3:0]  data4;
  int checks = 0, failures = 0;

  vipic_pixel dut (.clk, .rst_n, .hit, .tsclk_pix(ts), .ack, .req, .data);
  vipic_pixel #(.CNT_W(4)) dut4 (.clk, .rst_n, .hit, .tsclk_pix(ts), .ack,
                                 .req(req4), .data(data4));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (req=%0b data=%0d)", what, req, data);
    end
  endtask

  task automatic hits(input int n);
    repeat (n) begin
      @(negedge clk) hit = 1'b1;
      @(negedge clk) hit = 1'b0;
    end
  endtask

  task automatic frame_edge();
    @(negedge clk) ts = 1'b1;
    @(negedge clk) ts = 1'b0;
  endtask

  initial begin
    hit = 0; ts = 0; ack = 1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!req && data == 0, "idle after reset");

    // frame with 5 hits
    hits(5);
    check(!req, "no request before the frame edge");
    frame_edge();
    check(req && data == 0, "request raised, no data while ack high");
    @(negedge clk) ack = 1'b0;
    #1 check(data == 5, "data 5 while ack low");
    repeat (3) @(negedge clk);
    check(req && data == 5, "data held while ack low");
    ack = 1'b1;
    #1 check(req, "request still up in the ack rising cycle");
    @(negedge clk);
    check(!req && data == 0, "readout ended by ack rising edge");
    @(negedge clk) ack = 1'b0;
    #1 check(!req && data == 0, "no data after readout");
    @(negedge clk) ack = 1'b1;

    // empty frame
    frame_edge();
    check(!req, "empty frame raises no request");

    // unread frame overwritten by the next one
    hits(3);
    frame_edge();
    check(req, "frame of 3 hits requests");
    hits(7);
    frame_edge();
    @(negedge clk) ack = 1'b0;
    #1 check(data == 7, "new frame overwrites unread data");
    @(negedge clk) ack = 1'b1;
    @(negedge clk);
    check(!req, "cleared");

    // hit in the frame-edge cycle belongs to the new frame
    hits(2);
    @(negedge clk) begin ts = 1'b1; hit = 1'b1; end
    @(negedge clk) begin ts = 1'b0; hit = 1'b0; end
    @(negedge clk) ack = 1'b0;
    #1 check(data == 2, "edge-cycle hit not in old frame");
    @(negedge clk) ack = 1'b1;
    frame_edge();
    @(negedge clk) ack = 1'b0;
    #1 check(data == 1, "edge-cycle hit counted in new frame");
    @(negedge clk) ack = 1'b1;

    // saturation of the 4-bit instance, 20 bits keeps counting
    hits(20);
    frame_edge();
    @(negedge clk) ack = 1'b0;
    #1 begin
      check(data4 == 4'hF && req4, "4-bit counter saturates at 15");
      check(data == 20, "20-bit counter holds 20");
    end
    @(negedge clk) ack = 1'b1;
    @(negedge clk);
    check(!req4 && !req, "both cleared");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
