// tb_packet_parser - self-checking test of the packet receiver state
// machine. Sends random valid packets of all four types (lengths 0..255,
// random gaps between bytes) and checks every data byte, the packet event,
// type and length and that exactly one event is produced per packet. Then
// injects a bad type, a missing end byte, and a stalled packet that must time
// out after TIMEOUT_CYC idle cycles, each followed by a good packet to show
// resynchronisation. Counts each mechanism and fails if one never happens.
module tb_packet_parser;
  import cubebot_pkg::*;
  localparam int unsigned TO = 200;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic rx_valid = 0;
  logic [7:0] rx_byte = 0;
  logic data_valid, pkt_valid, pkt_abort;
  logic [7:0] data_idx, data_byte, pkt_type, pkt_len, err_count, timeout_count;
  logic [2:0] state;

  packet_parser #(.TIMEOUT_CYC(TO)) dut (.*);

  always #5 clk = ~clk;

  // scoreboard
  logic [7:0] exp_data [256];
  int n_data, n_valid, n_abort, n_timeout_seen;
  int exp_type, exp_len;

  always @(posedge clk) if (rst_n) begin
    if (data_valid) begin
      checks++;
      if (data_idx != 8'(n_data) || data_byte != exp_data[n_data]) begin
        failures++;
        $display("FAIL data idx %0d got %0d/%02x exp %02x", data_idx, n_data, data_byte, exp_data[n_data]);
      end
      n_data++;
    end
    if (pkt_valid) n_valid++;
    if (pkt_abort) n_abort++;
  end

  task automatic send(input logic [7:0] b, input int gap);
    @(negedge clk); rx_valid = 1; rx_byte = b;
    @(negedge clk); rx_valid = 0;
    repeat (gap) @(negedge clk);
  endtask

  task automatic good_packet(input logic [7:0] t, input int len);
    int v0 = n_valid;
    n_data = 0;
    for (int i = 0; i < len; i++) exp_data[i] = 8'($urandom());
    send(PKT_START, $urandom_range(0, 3));
    send(t, $urandom_range(0, 3));
    send(8'(len), $urandom_range(0, 3));
    for (int i = 0; i < len; i++) send(exp_data[i], $urandom_range(0, 2));
    send(PKT_END, 0);
    repeat (2) @(negedge clk);
    checks++;
    if (n_valid != v0 + 1 || n_data != len || pkt_type != t || pkt_len != 8'(len)) begin
      failures++;
      $display("FAIL packet t=%0h len=%0d: events %0d data %0d type %0h len %0d",
               t, len, n_valid - v0, n_data, pkt_type, pkt_len);
    end
  endtask

  initial begin
    #20_000_000 $display("FAIL watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] types [4] = '{PKT_FACE, PKT_MOVES, PKT_STATUS, PKT_CMD};
    int a0, e0, t0, stall_start, stall_end;
    int resyncs = 0, bad_types = 0, bad_ends = 0, timeouts = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    // noise before the first start byte is ignored
    send(8'h12, 0); send(8'hFF, 0);
    good_packet(PKT_MOVES, 0);
    good_packet(PKT_FACE, 255);
    good_packet(PKT_FACE, 10);   // face index + 9 colours
    for (int k = 0; k < 40; k++) good_packet(types[$urandom_range(0, 3)], $urandom_range(0, 60));
    // bad type
    a0 = n_abort; e0 = err_count;
    send(PKT_START, 0); send(8'h02, 0);
    repeat (2) @(negedge clk);
    checks++;
    if (n_abort == a0 + 1 && err_count == 8'(e0 + 1) && state == 3'd0) bad_types++;
    else begin failures++; $display("FAIL bad type not rejected"); end
    good_packet(PKT_STATUS, 3); resyncs++;
    // missing end byte
    a0 = n_abort; n_data = 0; exp_data[0] = 8'h11; exp_data[1] = 8'h22;
    send(PKT_START, 0); send(PKT_CMD, 0); send(8'd2, 0); send(8'h11, 0); send(8'h22, 0);
    send(8'h33, 0);
    repeat (2) @(negedge clk);
    checks++;
    if (n_abort == a0 + 1 && state == 3'd0) bad_ends++;
    else begin failures++; $display("FAIL missing end not rejected"); end
    good_packet(PKT_CMD, 1); resyncs++;
    // timeout: stall inside the data field
    a0 = n_abort; t0 = timeout_count; n_data = 0; exp_data[0] = 8'h01;
    send(PKT_START, 0); send(PKT_MOVES, 0); send(8'd5, 0);
    @(negedge clk); rx_valid = 1; rx_byte = 8'h01;
    @(negedge clk); rx_valid = 0; stall_start = $time / 10;
    while (n_abort == a0 && ($time / 10 - stall_start) < 10 * TO) @(negedge clk);
    stall_end = $time / 10;
    checks++;
    // abort pulse registered at the end of cycle TO after the last byte
    if (n_abort == a0 + 1 && timeout_count == 8'(t0 + 1) && (stall_end - stall_start) == TO + 1)
      timeouts++;
    else begin
      failures++;
      $display("FAIL timeout after %0d cycles (exp %0d), count %0d", stall_end - stall_start, TO + 1,
               timeout_count);
    end
    good_packet(PKT_MOVES, 7); resyncs++;
    // long gaps shorter than the timeout do not abort
    a0 = n_abort;
    n_data = 0; exp_data[0] = 8'h5A;
    send(PKT_START, TO - 10); send(PKT_FACE, TO - 10); send(8'd1, TO - 10);
    send(8'h5A, TO - 10); send(PKT_END, 2);
    checks++;
    if (n_abort != a0 || n_data != 1) begin failures++; $display("FAIL slow packet aborted"); end
    // mechanism coverage
    checks++;
    if (bad_types == 0 || bad_ends == 0 || timeouts == 0 || resyncs < 3) begin
      failures++; $display("FAIL mechanism not exercised");
    end
    $display("packets=%0d aborts=%0d timeouts=%0d", n_valid, n_abort, timeouts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
