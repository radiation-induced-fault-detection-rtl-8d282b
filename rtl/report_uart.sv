// report_uart: prints report records as text lines on an RS232 serial line.
//
// Each accepted record becomes one line of ASCII text ending in CR LF:
//   REC_CODE  "5E300020"        the 32-bit fault code as eight hex digits
//   REC_TIME  "T000123ABC"      'T' and the timestamp as nine hex digits
//   REC_BRAM  "Invalid BRAM 55545555"  the bad memory word as eight hex digits
// Characters go out as 8N1 frames (start bit, eight data bits LSB first,
// stop bit), one bit every round(CLK_HZ/BAUD) clock cycles; the line idles
// high. A fault-code line takes 10 characters, i.e. 100 bit times (about
// 0.43 ms at 230400 baud). 'rec_ready' is high only while the printer is
// idle, so a record is taken only when the previous line has left. The
// eight-hex-digit code format and the 230 kbit/s line follow the document;
// the other line formats and the framing are this design's choices.
module report_uart
  import asn_pkg::*;
#(
  parameter int unsigned CLK_HZ = 25_000_000,
  parameter int unsigned BAUD   = 230_400
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rec_valid,
  output logic        rec_ready,
  input  report_rec_t rec,
  output logic        txd
);
  localparam int unsigned DIV = (CLK_HZ + BAUD / 2) / BAUD;
  localparam int unsigned DW  = (DIV > 1) ? $clog2(DIV) : 1;

  function automatic logic [7:0] hex_char(input logic [3:0] n);
    return (n < 4'd10) ? 8'h30 + 8'(n) : 8'h41 + 8'(n) - 8'd10;
  endfunction

  // character number i of the line for record r; 8'h00 marks the end
  function automatic logic [7:0] line_char(input report_rec_t r, input logic [4:0] i);
    logic [35:0] d;
    logic [7:0]  pre [13];
    d   = 36'(r.data);
    pre = '{8'h49, 8'h6E, 8'h76, 8'h61, 8'h6C, 8'h69, 8'h64, 8'h20,   // "Invalid "
            8'h42, 8'h52, 8'h41, 8'h4D, 8'h20};                      // "BRAM "
    unique case (r.kind)
      REC_TIME: begin
        if (i == 0)       return 8'h54;                              // 'T'
        else if (i <= 9)  return hex_char(d[4*(9-i) +: 4]);
        else if (i == 10) return 8'h0D;
        else if (i == 11) return 8'h0A;
        else              return 8'h00;
      end
      REC_BRAM: begin
        if (i < 13)       return pre[i[3:0]];
        else if (i < 21)  return hex_char(d[4*(20-i) +: 4]);
        else if (i == 21) return 8'h0D;
        else if (i == 22) return 8'h0A;
        else              return 8'h00;
      end
      default: begin
        if (i < 8)        return hex_char(d[4*(7-i) +: 4]);
        else if (i == 8)  return 8'h0D;
        else if (i == 9)  return 8'h0A;
        else              return 8'h00;
      end
    endcase
  endfunction

  report_rec_t   cur;
  logic          busy;
  logic [4:0]    pos;       // character within the line
  logic [3:0]    bitn;      // 0 start, 1..8 data, 9 stop
  logic [DW-1:0] tick;
  logic [7:0]    ch;

  assign rec_ready = !busy;
  assign ch = line_char(cur, pos);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cur  <= '{kind: REC_CODE, data: '0};
      pos  <= '0;
      bitn <= '0;
      tick <= '0;
      txd  <= 1'b1;
    end else if (!busy) begin
      txd <= 1'b1;
      if (rec_valid) begin
        cur  <= rec;
        busy <= 1'b1;
        pos  <= '0;
        bitn <= '0;
        tick <= '0;
      end
    end else begin
      // drive the current bit for DIV cycles
      unique case (bitn)
        4'd0:    txd <= 1'b0;
        4'd9:    txd <= 1'b1;
        default: txd <= ch[3'(bitn - 4'd1)];
      endcase
      if (tick == DW'(DIV - 1)) begin
        tick <= '0;
        if (bitn == 4'd9) begin
          bitn <= '0;
          if (line_char(cur, pos + 5'd1) == 8'h00) busy <= 1'b0;
          else pos <= pos + 5'd1;
        end else begin
          bitn <= bitn + 4'd1;
        end
      end else begin
        tick <= tick + 1'b1;
      end
    end
  end
endmodule
