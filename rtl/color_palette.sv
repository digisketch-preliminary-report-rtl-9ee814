// color_palette: turns a 4-bit color ID into a 24-bit RGB value.
//
// The report keeps 4-bit color IDs in the frame buffer and expands them with
// a case statement; it does not list the 16 colors. This design uses the
// classic 16-color text-mode palette: 0 black (the empty canvas), 1 navy,
// 2 green, 3 teal, 4 maroon, 5 purple, 6 brown, 7 light gray, 8 dark gray,
// 9 blue, 10 lime, 11 cyan, 12 red, 13 magenta, 14 yellow, 15 white.
// Output is {red, green, blue}, 8 bits each. Purely combinational.
module color_palette (
  input  logic [3:0]  id,
  output logic [23:0] rgb
);
  always_comb begin
    unique case (id)
      4'h0: rgb = 24'h000000;
      4'h1: rgb = 24'h0000AA;
      4'h2: rgb = 24'h00AA00;
      4'h3: rgb = 24'h00AAAA;
      4'h4: rgb = 24'hAA0000;
      4'h5: rgb = 24'hAA00AA;
      4'h6: rgb = 24'hAA5500;
      4'h7: rgb = 24'hAAAAAA;
      4'h8: rgb = 24'h555555;
      4'h9: rgb = 24'h5555FF;
      4'hA: rgb = 24'h55FF55;
      4'hB: rgb = 24'h55FFFF;
      4'hC: rgb = 24'hFF5555;
      4'hD: rgb = 24'hFF55FF;
      4'hE: rgb = 24'hFFFF55;
      default: rgb = 24'hFFFFFF;
    endcase
  end
endmodule
