// tb_net_if: two network interfaces (chip 5 sending to chip 9) are joined by
// a link whose handshake is randomly stalled. The sender's P.Mem side pushes
// payload words and issues sends of random length (0..16 words); the receiver
// pops its In queue at random times. Checks: every header word
// {dest, src, len, type} and payload word arrives in order, out_count and
// in_count track, send_busy holds off a second send, the In queue back-
// pressures the link when full, and with an idle link a message of len words
// is fully in the receiver's In queue exactly len+1 clock edges after send.
module tb_net_if;
  logic clk = 0, rst_n = 0;
  logic go;
  // sender (A) and receiver (B)
  logic a_push, a_send, a_busy, a_txv, a_txr, a_rxr, a_pop;
  logic [31:0] a_wdata, a_rdata; logic [7:0] a_dest, a_len, a_type;
  logic [5:0] a_oc, a_ic; logic [1:0][15:0] a_txb;
  logic b_push, b_send, b_busy, b_txv, b_rxr, b_pop;
  logic [31:0] b_rdata; logic [5:0] b_oc, b_ic; logic [1:0][15:0] b_txb;
  int checks = 0, failures = 0;
  logic [31:0] expq [$];
  logic popping = 0;

  net_if #(.DEPTH(32)) u_a (.clk, .rst_n, .chip_id(8'd5),
    .tx_push(a_push), .tx_wdata(a_wdata), .send(a_send), .send_dest(a_dest), .send_len(a_len),
    .send_type(a_type), .send_busy(a_busy), .out_count(a_oc), .rx_pop(a_pop), .rx_rdata(a_rdata),
    .in_count(a_ic), .tx_valid(a_txv), .tx_ready(a_txr), .tx_beat(a_txb),
    .rx_valid(1'b0), .rx_ready(a_rxr), .rx_beat('0));
  net_if #(.DEPTH(32)) u_b (.clk, .rst_n, .chip_id(8'd9),
    .tx_push(b_push), .tx_wdata('0), .send(b_send), .send_dest('0), .send_len('0),
    .send_type('0), .send_busy(b_busy), .out_count(b_oc), .rx_pop(b_pop), .rx_rdata(b_rdata),
    .in_count(b_ic), .tx_valid(b_txv), .tx_ready(1'b0), .tx_beat(b_txb),
    .rx_valid(a_txv && go), .rx_ready(b_rxr), .rx_beat(a_txb));
  assign a_txr = b_rxr && go;

  always #5 clk = ~clk;
  initial begin #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // receiver: pop at random, compare with the expected stream
  always @(negedge clk) begin
    b_pop = 1'b0;
    if (rst_n && popping && b_ic != 0 && $urandom_range(2) == 0) begin
      checks++;
      if (expq.size() == 0) begin failures++; $display("unexpected word %h", b_rdata); end
      else begin
        logic [31:0] e; e = expq.pop_front();
        if (b_rdata !== e) begin failures++; $display("rx word %h expected %h", b_rdata, e); end
      end
      b_pop = 1'b1;
    end
  end

  task automatic send_msg(int len, int t, logic [7:0] d);
    for (int i = 0; i < len; i++) begin
      logic [31:0] w; w = $urandom;
      @(negedge clk); a_push = 1; a_wdata = w;
      @(negedge clk); a_push = 0;
      expq.push_back(w);
    end
    expq.insert(expq.size() - len, {d, 8'd5, 8'(len), 8'(t)});
    @(negedge clk);
    while (a_busy) @(negedge clk);
    a_send = 1; a_dest = d; a_len = 8'(len); a_type = 8'(t);
    @(negedge clk); a_send = 0;
    checks++; if (!a_busy) begin failures++; $display("send_busy not raised"); end
  endtask

  initial begin
    a_push = 0; a_send = 0; a_wdata = 0; a_dest = 0; a_len = 0; a_type = 0; a_pop = 0;
    b_push = 0; b_send = 0; go = 1;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    // timed message on an idle link, receiver not popping
    for (int i = 0; i < 7; i++) begin @(negedge clk); a_push = 1; a_wdata = 32'h100 + i; @(negedge clk); a_push = 0; end
    checks++; if (a_oc != 7) begin failures++; $display("out_count %0d", a_oc); end
    @(negedge clk); a_send = 1; a_dest = 8'd9; a_len = 8'd7; a_type = 8'd3;
    @(posedge clk); #1 a_send = 0;
    for (int e = 1; e <= 8; e++) begin
      @(posedge clk); #1;
      checks++;
      if (b_ic != 6'(e)) begin failures++; $display("edge %0d in_count %0d", e, b_ic); end
    end
    checks++; if (a_busy || a_oc != 0) begin failures++; $display("sender not idle"); end
    expq.push_back({8'd9, 8'd5, 8'd7, 8'd3});
    for (int i = 0; i < 7; i++) expq.push_back(32'h100 + i);
    // random stalls and traffic; first let the In queue fill to test back-pressure
    fork
      forever begin @(negedge clk); go = ($urandom_range(3) != 0); end
    join_none
    fork
      for (int m = 0; m < 3; m++) send_msg(12, m, 8'd9);
      begin
        repeat (300) @(negedge clk);
        checks++; if (b_ic != 32 || b_rxr) begin failures++; $display("In queue should be full, in_count %0d", b_ic); end
        popping = 1;
      end
    join
    for (int m = 0; m < 60; m++) send_msg($urandom_range(0, 16), m, 8'($urandom_range(255)));
    while (expq.size() != 0) @(negedge clk);
    repeat (5) @(negedge clk);
    checks++; if (b_ic != 0) begin failures++; $display("leftover words %0d", b_ic); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
