// ppan_border: what the Slaves on the outer edges of the 16x16 array see
// beyond the edge. The document offers three settings, chosen by program:
//   BRD_INPUT  the leftmost column reads the image input lines, one byte per
//              row (pictures are shifted in from the left); the other edges
//              read the border value
//   BRD_WRAP   leftmost and rightmost columns are neighbours, as are the top
//              and bottom rows
//   BRD_CONST  every edge reads the border value (e.g. 0 for background)
// Mode and value are registers written from the common bus. Left-right links
// are bytes (memory data and A registers); up-down links are one bit wide, so
// for a constant border a shift register per Group column replays the value
// MSB first, loaded when the edge Group starts an up-down transfer (vstart)
// and advanced on each bit (vstep). Reset mode is BRD_CONST with value 0,
// which is this design's choice.
module ppan_border
  import ppan_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    we,
  input  border_e mode_in,
  input  byte_t   val_in,
  output border_e mode,
  output byte_t   val,
  input  byte_t   img_in     [ASIDE],   // image input line of each row
  // what the edge Slaves offer outward (index = row or column of the array)
  input  byte_t   wedge_mem_o[ASIDE],
  input  byte_t   wedge_a_o  [ASIDE],
  input  byte_t   eedge_mem_o[ASIDE],
  input  byte_t   eedge_a_o  [ASIDE],
  input  logic    nedge_v_o  [ASIDE],
  input  logic    sedge_v_o  [ASIDE],
  // what the edge Slaves read beyond the edge
  output byte_t   wedge_mem_i[ASIDE],
  output byte_t   wedge_a_i  [ASIDE],
  output byte_t   eedge_mem_i[ASIDE],
  output byte_t   eedge_a_i  [ASIDE],
  output logic    nedge_v_i  [ASIDE],
  output logic    sedge_v_i  [ASIDE],
  // up-down activity of the top-row and bottom-row Groups
  input  logic    top_vstart [GSIDE],
  input  logic    top_vstep  [GSIDE],
  input  logic    bot_vstart [GSIDE],
  input  logic    bot_vstep  [GSIDE]
);
  byte_t nsh [GSIDE];
  byte_t ssh [GSIDE];

  always_ff @(posedge clk) begin
    if (rst) begin
      mode <= BRD_CONST;
      val  <= '0;
      for (int g = 0; g < GSIDE; g++) begin
        nsh[g] <= '0;
        ssh[g] <= '0;
      end
    end else begin
      if (we) begin
        mode <= mode_in;
        val  <= val_in;
      end
      for (int g = 0; g < GSIDE; g++) begin
        if (top_vstart[g] && top_vstep[g]) nsh[g] <= {val[6:0], 1'b0};
        else if (top_vstart[g])            nsh[g] <= val;
        else if (top_vstep[g])             nsh[g] <= {nsh[g][6:0], 1'b0};
        if (bot_vstart[g] && bot_vstep[g]) ssh[g] <= {val[6:0], 1'b0};
        else if (bot_vstart[g])            ssh[g] <= val;
        else if (bot_vstep[g])             ssh[g] <= {ssh[g][6:0], 1'b0};
      end
    end
  end

  always_comb begin
    for (int i = 0; i < ASIDE; i++) begin
      logic nb, sb;
      nb = top_vstart[i / SIDE] ? val[7] : nsh[i / SIDE][7];
      sb = bot_vstart[i / SIDE] ? val[7] : ssh[i / SIDE][7];
      unique case (mode)
        BRD_WRAP: begin
          wedge_mem_i[i] = eedge_mem_o[i];
          wedge_a_i[i]   = eedge_a_o[i];
          eedge_mem_i[i] = wedge_mem_o[i];
          eedge_a_i[i]   = wedge_a_o[i];
          nedge_v_i[i]   = sedge_v_o[i];
          sedge_v_i[i]   = nedge_v_o[i];
        end
        BRD_INPUT: begin
          wedge_mem_i[i] = img_in[i];
          wedge_a_i[i]   = img_in[i];
          eedge_mem_i[i] = val;
          eedge_a_i[i]   = val;
          nedge_v_i[i]   = nb;
          sedge_v_i[i]   = sb;
        end
        default: begin
          wedge_mem_i[i] = val;
          wedge_a_i[i]   = val;
          eedge_mem_i[i] = val;
          eedge_a_i[i]   = val;
          nedge_v_i[i]   = nb;
          sedge_v_i[i]   = sb;
        end
      endcase
    end
  end
endmodule
