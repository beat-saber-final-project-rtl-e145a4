// tb_sd_card_model: behavioural model of an SD card controller that reads
// 512-byte sectors, for testbenches. While `ready` is high, `rd` starts a
// read at `address`; `ready` falls, then every BYTE_GAP clocks one byte is
// offered on `dout` with `byte_available` high for two clocks; after the
// 512th byte `ready` rises again. Card contents: a WAV header in the first
// sector (the tag "data" at offset 36, followed by the 32-bit little-endian
// length DATA_LEN), and from byte 512 on byte(a) = (a*7 + a/256) mod 256.
//
// From the source description: the interface behaviour it imitates (byte rate, framing).
// My own choices: all timing details, data contents and the task interface.
module tb_sd_card_model #(
  parameter int BYTE_GAP = 20,
  parameter int DATA_LEN = 3000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        rd,
  input  logic [31:0] address,
  output logic        ready,
  output logic        byte_available,
  output logic [7:0]  dout
);
  int reads = 0;
  int busy_cnt, byte_idx;
  logic [31:0] base;
  logic active;

  function automatic logic [7:0] content(input longint a);
    logic [31:0] len = 32'(DATA_LEN);
    if (a >= 512) return 8'((a * 7 + a / 256) % 256);
    case (a)
      0: return "R"; 1: return "I"; 2: return "F"; 3: return "F";
      8: return "W"; 9: return "A"; 10: return "V"; 11: return "E";
      36: return "d"; 37: return "a"; 38: return "t"; 39: return "a";
      40: return len[7:0]; 41: return len[15:8]; 42: return len[23:16]; 43: return len[31:24];
      default: return 8'h00;
    endcase
  endfunction

  always @(posedge clk) begin
    if (rst) begin
      ready <= 1'b1; byte_available <= 1'b0; dout <= '0; active <= 1'b0;
      busy_cnt <= 0; byte_idx <= 0;
    end else if (!active) begin
      byte_available <= 1'b0;
      if (ready && rd) begin
        ready <= 1'b0; active <= 1'b1; base <= address; busy_cnt <= 0; byte_idx <= 0;
        reads <= reads + 1;
      end
    end else begin
      busy_cnt <= busy_cnt + 1;
      byte_available <= 1'b0;
      if (busy_cnt == BYTE_GAP - 1) begin
        busy_cnt <= 0;
        if (byte_idx == 512) begin
          active <= 1'b0; ready <= 1'b1;
        end else begin
          dout <= content(longint'(base) + byte_idx);
          byte_available <= 1'b1;
          byte_idx <= byte_idx + 1;
        end
      end else if (busy_cnt == 0 && byte_idx > 0) begin
        byte_available <= 1'b1;
      end
    end
  end
endmodule
