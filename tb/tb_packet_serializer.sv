// tb_packet_serializer: frame format and timing of the serializer.
//
// Random frames of NCH packets (random lengths 1..16, random contents within
// the length) and random 3-bit delimiters are offered. The symbol stream is
// sampled and compared with the expected sequence delimiter, packet 0,
// delimiter, ..., packet NCH-1, delimiter (most significant bit first),
// built independently here. Each symbol must occupy one cycle with the DATA
// bit and one return-to-zero cycle, and frame_done must come exactly
// 2 * (sum of lengths + (NCH+1)*3) cycles after the rd_ack cycle. The
// packets are changed right after rd_ack to check that they were copied.
module tb_packet_serializer;
  timeunit 1ns; timeprecision 1ps;

  localparam int N = 16, NCH = 8, DL = 3;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, start = 0;
  logic [N-1:0] pk_data [NCH];
  logic [N-1:0] pk_dir  [NCH];
  logic [4:0]   pk_len  [NCH];
  logic [DL-1:0] delim_data, delim_dir;
  logic rd_ack, tx_data, tx_dir, busy, frame_done;

  packet_serializer #(.N(N), .NCH(NCH), .DL(DL)) dut (.clk(clk), .rst_n(rst_n), .start(start),
    .pk_data(pk_data), .pk_dir(pk_dir), .pk_len(pk_len), .delim_data(delim_data),
    .delim_dir(delim_dir), .rd_ack(rd_ack), .tx_data(tx_data), .tx_dir(tx_dir),
    .busy(busy), .frame_done(frame_done));

  always #5 clk = !clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    logic exp_d [$];
    logic exp_r [$];
    for (int c = 0; c < NCH; c++) begin pk_data[c] = '0; pk_dir[c] = '0; pk_len[c] = 5'd1; end
    delim_data = 3'b111; delim_dir = 3'b101;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 200; f++) begin
      int sum, cyc;
      exp_d.delete(); exp_r.delete();
      delim_data = DL'($urandom); delim_dir = DL'($urandom);
      sum = 0;
      for (int c = 0; c < NCH; c++) begin
        pk_len[c]  = 5'($urandom_range(1, N));
        pk_data[c] = N'($urandom) & N'((32'd1 << pk_len[c]) - 1);
        pk_dir[c]  = N'($urandom) & pk_data[c];
        sum += int'(pk_len[c]);
      end
      for (int c = 0; c <= NCH; c++) begin
        for (int i = DL - 1; i >= 0; i--) begin exp_d.push_back(delim_data[i]); exp_r.push_back(delim_dir[i]); end
        if (c < NCH)
          for (int i = int'(pk_len[c]) - 1; i >= 0; i--) begin
            exp_d.push_back(pk_data[c][i]); exp_r.push_back(pk_dir[c][i]);
          end
      end
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      check(rd_ack, "rd_ack one cycle after start");
      // the packets may change once they have been copied
      for (int c = 0; c < NCH; c++) begin pk_data[c] = ~pk_data[c]; pk_dir[c] = '1; end
      cyc = 0;
      for (int k = 0; k < exp_d.size(); k++) begin
        @(negedge clk); cyc++;
        check(tx_data == exp_d[k] && tx_dir == exp_r[k], "symbol");
        check(busy, "busy during the frame");
        @(negedge clk); cyc++;
        check(tx_data == 1'b0, "return to zero");
        if (k + 1 < exp_d.size()) check(!frame_done, "no early frame_done");
      end
      // the last return-to-zero cycle is the one that reports the frame done
      check(frame_done, "frame_done");
      check(cyc == 2 * (sum + (NCH + 1) * DL), "frame length in cycles");
      check(!busy, "idle after the frame");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
