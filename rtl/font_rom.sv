// Character table of the on-screen text: 128 ASCII codes x 16 rows of 8 pixels.
//
// Address {code[6:0], row[3:0]} selects one row of a glyph; bit 7 of the row is the leftmost
// pixel. The read is combinational, as a distributed ROM written as a constant case table so
// that every tool builds the same contents; only non-blank rows are listed, all other rows are 0.
// The same table is kept as font8x16.hex (2048 lines, one hex byte each) for the testbenches.
// The 'A' glyph is the 8x16 shape of the original font; the digits, letters and the
// punctuation used on screen are own 5x7 shapes centred in the cell; the remaining codes are
// blank.
module font_rom (
  input  logic [10:0] i_addr,
  output logic [7:0]  o_row
);
  always_comb begin
    case (i_addr)
      // '('
      11'h284: o_row = 8'h08;
      11'h285: o_row = 8'h10;
      11'h286: o_row = 8'h20;
      11'h287: o_row = 8'h20;
      11'h288: o_row = 8'h20;
      11'h289: o_row = 8'h10;
      11'h28A: o_row = 8'h08;
      // ')'
      11'h294: o_row = 8'h20;
      11'h295: o_row = 8'h10;
      11'h296: o_row = 8'h08;
      11'h297: o_row = 8'h08;
      11'h298: o_row = 8'h08;
      11'h299: o_row = 8'h10;
      11'h29A: o_row = 8'h20;
      // '+'
      11'h2B5: o_row = 8'h10;
      11'h2B6: o_row = 8'h10;
      11'h2B7: o_row = 8'h7C;
      11'h2B8: o_row = 8'h10;
      11'h2B9: o_row = 8'h10;
      // '-'
      11'h2D7: o_row = 8'h7C;
      // '.'
      11'h2E9: o_row = 8'h30;
      11'h2EA: o_row = 8'h30;
      // '0'
      11'h304: o_row = 8'h38;
      11'h305: o_row = 8'h44;
      11'h306: o_row = 8'h4C;
      11'h307: o_row = 8'h54;
      11'h308: o_row = 8'h64;
      11'h309: o_row = 8'h44;
      11'h30A: o_row = 8'h38;
      // '1'
      11'h314: o_row = 8'h10;
      11'h315: o_row = 8'h30;
      11'h316: o_row = 8'h10;
      11'h317: o_row = 8'h10;
      11'h318: o_row = 8'h10;
      11'h319: o_row = 8'h10;
      11'h31A: o_row = 8'h38;
      // '2'
      11'h324: o_row = 8'h38;
      11'h325: o_row = 8'h44;
      11'h326: o_row = 8'h04;
      11'h327: o_row = 8'h08;
      11'h328: o_row = 8'h10;
      11'h329: o_row = 8'h20;
      11'h32A: o_row = 8'h7C;
      // '3'
      11'h334: o_row = 8'h7C;
      11'h335: o_row = 8'h08;
      11'h336: o_row = 8'h10;
      11'h337: o_row = 8'h08;
      11'h338: o_row = 8'h04;
      11'h339: o_row = 8'h44;
      11'h33A: o_row = 8'h38;
      // '4'
      11'h344: o_row = 8'h08;
      11'h345: o_row = 8'h18;
      11'h346: o_row = 8'h28;
      11'h347: o_row = 8'h48;
      11'h348: o_row = 8'h7C;
      11'h349: o_row = 8'h08;
      11'h34A: o_row = 8'h08;
      // '5'
      11'h354: o_row = 8'h7C;
      11'h355: o_row = 8'h40;
      11'h356: o_row = 8'h78;
      11'h357: o_row = 8'h04;
      11'h358: o_row = 8'h04;
      11'h359: o_row = 8'h44;
      11'h35A: o_row = 8'h38;
      // '6'
      11'h364: o_row = 8'h18;
      11'h365: o_row = 8'h20;
      11'h366: o_row = 8'h40;
      11'h367: o_row = 8'h78;
      11'h368: o_row = 8'h44;
      11'h369: o_row = 8'h44;
      11'h36A: o_row = 8'h38;
      // '7'
      11'h374: o_row = 8'h7C;
      11'h375: o_row = 8'h04;
      11'h376: o_row = 8'h08;
      11'h377: o_row = 8'h10;
      11'h378: o_row = 8'h20;
      11'h379: o_row = 8'h20;
      11'h37A: o_row = 8'h20;
      // '8'
      11'h384: o_row = 8'h38;
      11'h385: o_row = 8'h44;
      11'h386: o_row = 8'h44;
      11'h387: o_row = 8'h38;
      11'h388: o_row = 8'h44;
      11'h389: o_row = 8'h44;
      11'h38A: o_row = 8'h38;
      // '9'
      11'h394: o_row = 8'h38;
      11'h395: o_row = 8'h44;
      11'h396: o_row = 8'h44;
      11'h397: o_row = 8'h3C;
      11'h398: o_row = 8'h04;
      11'h399: o_row = 8'h08;
      11'h39A: o_row = 8'h30;
      // ':'
      11'h3A5: o_row = 8'h30;
      11'h3A6: o_row = 8'h30;
      11'h3A8: o_row = 8'h30;
      11'h3A9: o_row = 8'h30;
      // 'A'
      11'h412: o_row = 8'h10;
      11'h413: o_row = 8'h38;
      11'h414: o_row = 8'h6C;
      11'h415: o_row = 8'hC6;
      11'h416: o_row = 8'hC6;
      11'h417: o_row = 8'hFE;
      11'h418: o_row = 8'hC6;
      11'h419: o_row = 8'hC6;
      11'h41A: o_row = 8'hC6;
      11'h41B: o_row = 8'hC6;
      // 'B'
      11'h424: o_row = 8'h78;
      11'h425: o_row = 8'h44;
      11'h426: o_row = 8'h44;
      11'h427: o_row = 8'h78;
      11'h428: o_row = 8'h44;
      11'h429: o_row = 8'h44;
      11'h42A: o_row = 8'h78;
      // 'C'
      11'h434: o_row = 8'h38;
      11'h435: o_row = 8'h44;
      11'h436: o_row = 8'h40;
      11'h437: o_row = 8'h40;
      11'h438: o_row = 8'h40;
      11'h439: o_row = 8'h44;
      11'h43A: o_row = 8'h38;
      // 'D'
      11'h444: o_row = 8'h70;
      11'h445: o_row = 8'h48;
      11'h446: o_row = 8'h44;
      11'h447: o_row = 8'h44;
      11'h448: o_row = 8'h44;
      11'h449: o_row = 8'h48;
      11'h44A: o_row = 8'h70;
      // 'E'
      11'h454: o_row = 8'h7C;
      11'h455: o_row = 8'h40;
      11'h456: o_row = 8'h40;
      11'h457: o_row = 8'h78;
      11'h458: o_row = 8'h40;
      11'h459: o_row = 8'h40;
      11'h45A: o_row = 8'h7C;
      // 'F'
      11'h464: o_row = 8'h7C;
      11'h465: o_row = 8'h40;
      11'h466: o_row = 8'h40;
      11'h467: o_row = 8'h78;
      11'h468: o_row = 8'h40;
      11'h469: o_row = 8'h40;
      11'h46A: o_row = 8'h40;
      // 'G'
      11'h474: o_row = 8'h38;
      11'h475: o_row = 8'h44;
      11'h476: o_row = 8'h40;
      11'h477: o_row = 8'h5C;
      11'h478: o_row = 8'h44;
      11'h479: o_row = 8'h44;
      11'h47A: o_row = 8'h3C;
      // 'H'
      11'h484: o_row = 8'h44;
      11'h485: o_row = 8'h44;
      11'h486: o_row = 8'h44;
      11'h487: o_row = 8'h7C;
      11'h488: o_row = 8'h44;
      11'h489: o_row = 8'h44;
      11'h48A: o_row = 8'h44;
      // 'I'
      11'h494: o_row = 8'h38;
      11'h495: o_row = 8'h10;
      11'h496: o_row = 8'h10;
      11'h497: o_row = 8'h10;
      11'h498: o_row = 8'h10;
      11'h499: o_row = 8'h10;
      11'h49A: o_row = 8'h38;
      // 'J'
      11'h4A4: o_row = 8'h1C;
      11'h4A5: o_row = 8'h08;
      11'h4A6: o_row = 8'h08;
      11'h4A7: o_row = 8'h08;
      11'h4A8: o_row = 8'h08;
      11'h4A9: o_row = 8'h48;
      11'h4AA: o_row = 8'h30;
      // 'K'
      11'h4B4: o_row = 8'h44;
      11'h4B5: o_row = 8'h48;
      11'h4B6: o_row = 8'h50;
      11'h4B7: o_row = 8'h60;
      11'h4B8: o_row = 8'h50;
      11'h4B9: o_row = 8'h48;
      11'h4BA: o_row = 8'h44;
      // 'L'
      11'h4C4: o_row = 8'h40;
      11'h4C5: o_row = 8'h40;
      11'h4C6: o_row = 8'h40;
      11'h4C7: o_row = 8'h40;
      11'h4C8: o_row = 8'h40;
      11'h4C9: o_row = 8'h40;
      11'h4CA: o_row = 8'h7C;
      // 'M'
      11'h4D4: o_row = 8'h44;
      11'h4D5: o_row = 8'h6C;
      11'h4D6: o_row = 8'h54;
      11'h4D7: o_row = 8'h54;
      11'h4D8: o_row = 8'h44;
      11'h4D9: o_row = 8'h44;
      11'h4DA: o_row = 8'h44;
      // 'N'
      11'h4E4: o_row = 8'h44;
      11'h4E5: o_row = 8'h44;
      11'h4E6: o_row = 8'h64;
      11'h4E7: o_row = 8'h54;
      11'h4E8: o_row = 8'h4C;
      11'h4E9: o_row = 8'h44;
      11'h4EA: o_row = 8'h44;
      // 'O'
      11'h4F4: o_row = 8'h38;
      11'h4F5: o_row = 8'h44;
      11'h4F6: o_row = 8'h44;
      11'h4F7: o_row = 8'h44;
      11'h4F8: o_row = 8'h44;
      11'h4F9: o_row = 8'h44;
      11'h4FA: o_row = 8'h38;
      // 'P'
      11'h504: o_row = 8'h78;
      11'h505: o_row = 8'h44;
      11'h506: o_row = 8'h44;
      11'h507: o_row = 8'h78;
      11'h508: o_row = 8'h40;
      11'h509: o_row = 8'h40;
      11'h50A: o_row = 8'h40;
      // 'Q'
      11'h514: o_row = 8'h38;
      11'h515: o_row = 8'h44;
      11'h516: o_row = 8'h44;
      11'h517: o_row = 8'h44;
      11'h518: o_row = 8'h54;
      11'h519: o_row = 8'h48;
      11'h51A: o_row = 8'h34;
      // 'R'
      11'h524: o_row = 8'h78;
      11'h525: o_row = 8'h44;
      11'h526: o_row = 8'h44;
      11'h527: o_row = 8'h78;
      11'h528: o_row = 8'h50;
      11'h529: o_row = 8'h48;
      11'h52A: o_row = 8'h44;
      // 'S'
      11'h534: o_row = 8'h3C;
      11'h535: o_row = 8'h40;
      11'h536: o_row = 8'h40;
      11'h537: o_row = 8'h38;
      11'h538: o_row = 8'h04;
      11'h539: o_row = 8'h04;
      11'h53A: o_row = 8'h78;
      // 'T'
      11'h544: o_row = 8'h7C;
      11'h545: o_row = 8'h10;
      11'h546: o_row = 8'h10;
      11'h547: o_row = 8'h10;
      11'h548: o_row = 8'h10;
      11'h549: o_row = 8'h10;
      11'h54A: o_row = 8'h10;
      // 'U'
      11'h554: o_row = 8'h44;
      11'h555: o_row = 8'h44;
      11'h556: o_row = 8'h44;
      11'h557: o_row = 8'h44;
      11'h558: o_row = 8'h44;
      11'h559: o_row = 8'h44;
      11'h55A: o_row = 8'h38;
      // 'V'
      11'h564: o_row = 8'h44;
      11'h565: o_row = 8'h44;
      11'h566: o_row = 8'h44;
      11'h567: o_row = 8'h44;
      11'h568: o_row = 8'h44;
      11'h569: o_row = 8'h28;
      11'h56A: o_row = 8'h10;
      // 'W'
      11'h574: o_row = 8'h44;
      11'h575: o_row = 8'h44;
      11'h576: o_row = 8'h44;
      11'h577: o_row = 8'h54;
      11'h578: o_row = 8'h54;
      11'h579: o_row = 8'h54;
      11'h57A: o_row = 8'h28;
      // 'X'
      11'h584: o_row = 8'h44;
      11'h585: o_row = 8'h44;
      11'h586: o_row = 8'h28;
      11'h587: o_row = 8'h10;
      11'h588: o_row = 8'h28;
      11'h589: o_row = 8'h44;
      11'h58A: o_row = 8'h44;
      // 'Y'
      11'h594: o_row = 8'h44;
      11'h595: o_row = 8'h44;
      11'h596: o_row = 8'h44;
      11'h597: o_row = 8'h28;
      11'h598: o_row = 8'h10;
      11'h599: o_row = 8'h10;
      11'h59A: o_row = 8'h10;
      // 'Z'
      11'h5A4: o_row = 8'h7C;
      11'h5A5: o_row = 8'h04;
      11'h5A6: o_row = 8'h08;
      11'h5A7: o_row = 8'h10;
      11'h5A8: o_row = 8'h20;
      11'h5A9: o_row = 8'h40;
      11'h5AA: o_row = 8'h7C;
      // 'a'
      11'h616: o_row = 8'h38;
      11'h617: o_row = 8'h04;
      11'h618: o_row = 8'h3C;
      11'h619: o_row = 8'h44;
      11'h61A: o_row = 8'h3C;
      // 'b'
      11'h624: o_row = 8'h40;
      11'h625: o_row = 8'h40;
      11'h626: o_row = 8'h58;
      11'h627: o_row = 8'h64;
      11'h628: o_row = 8'h44;
      11'h629: o_row = 8'h44;
      11'h62A: o_row = 8'h78;
      // 'c'
      11'h636: o_row = 8'h38;
      11'h637: o_row = 8'h40;
      11'h638: o_row = 8'h40;
      11'h639: o_row = 8'h44;
      11'h63A: o_row = 8'h38;
      // 'd'
      11'h644: o_row = 8'h04;
      11'h645: o_row = 8'h04;
      11'h646: o_row = 8'h34;
      11'h647: o_row = 8'h4C;
      11'h648: o_row = 8'h44;
      11'h649: o_row = 8'h44;
      11'h64A: o_row = 8'h3C;
      // 'e'
      11'h656: o_row = 8'h38;
      11'h657: o_row = 8'h44;
      11'h658: o_row = 8'h7C;
      11'h659: o_row = 8'h40;
      11'h65A: o_row = 8'h38;
      // 'f'
      11'h664: o_row = 8'h18;
      11'h665: o_row = 8'h24;
      11'h666: o_row = 8'h20;
      11'h667: o_row = 8'h70;
      11'h668: o_row = 8'h20;
      11'h669: o_row = 8'h20;
      11'h66A: o_row = 8'h20;
      // 'g'
      11'h675: o_row = 8'h3C;
      11'h676: o_row = 8'h44;
      11'h677: o_row = 8'h44;
      11'h678: o_row = 8'h3C;
      11'h679: o_row = 8'h04;
      11'h67A: o_row = 8'h38;
      // 'h'
      11'h684: o_row = 8'h40;
      11'h685: o_row = 8'h40;
      11'h686: o_row = 8'h58;
      11'h687: o_row = 8'h64;
      11'h688: o_row = 8'h44;
      11'h689: o_row = 8'h44;
      11'h68A: o_row = 8'h44;
      // 'i'
      11'h694: o_row = 8'h10;
      11'h696: o_row = 8'h30;
      11'h697: o_row = 8'h10;
      11'h698: o_row = 8'h10;
      11'h699: o_row = 8'h10;
      11'h69A: o_row = 8'h38;
      // 'j'
      11'h6A4: o_row = 8'h08;
      11'h6A6: o_row = 8'h18;
      11'h6A7: o_row = 8'h08;
      11'h6A8: o_row = 8'h08;
      11'h6A9: o_row = 8'h48;
      11'h6AA: o_row = 8'h30;
      // 'k'
      11'h6B4: o_row = 8'h40;
      11'h6B5: o_row = 8'h40;
      11'h6B6: o_row = 8'h48;
      11'h6B7: o_row = 8'h50;
      11'h6B8: o_row = 8'h60;
      11'h6B9: o_row = 8'h50;
      11'h6BA: o_row = 8'h48;
      // 'l'
      11'h6C4: o_row = 8'h30;
      11'h6C5: o_row = 8'h10;
      11'h6C6: o_row = 8'h10;
      11'h6C7: o_row = 8'h10;
      11'h6C8: o_row = 8'h10;
      11'h6C9: o_row = 8'h10;
      11'h6CA: o_row = 8'h38;
      // 'm'
      11'h6D6: o_row = 8'h68;
      11'h6D7: o_row = 8'h54;
      11'h6D8: o_row = 8'h54;
      11'h6D9: o_row = 8'h44;
      11'h6DA: o_row = 8'h44;
      // 'n'
      11'h6E6: o_row = 8'h58;
      11'h6E7: o_row = 8'h64;
      11'h6E8: o_row = 8'h44;
      11'h6E9: o_row = 8'h44;
      11'h6EA: o_row = 8'h44;
      // 'o'
      11'h6F6: o_row = 8'h38;
      11'h6F7: o_row = 8'h44;
      11'h6F8: o_row = 8'h44;
      11'h6F9: o_row = 8'h44;
      11'h6FA: o_row = 8'h38;
      // 'p'
      11'h706: o_row = 8'h78;
      11'h707: o_row = 8'h44;
      11'h708: o_row = 8'h78;
      11'h709: o_row = 8'h40;
      11'h70A: o_row = 8'h40;
      // 'q'
      11'h716: o_row = 8'h34;
      11'h717: o_row = 8'h4C;
      11'h718: o_row = 8'h3C;
      11'h719: o_row = 8'h04;
      11'h71A: o_row = 8'h04;
      // 'r'
      11'h726: o_row = 8'h58;
      11'h727: o_row = 8'h64;
      11'h728: o_row = 8'h40;
      11'h729: o_row = 8'h40;
      11'h72A: o_row = 8'h40;
      // 's'
      11'h736: o_row = 8'h38;
      11'h737: o_row = 8'h40;
      11'h738: o_row = 8'h38;
      11'h739: o_row = 8'h04;
      11'h73A: o_row = 8'h78;
      // 't'
      11'h744: o_row = 8'h20;
      11'h745: o_row = 8'h20;
      11'h746: o_row = 8'h70;
      11'h747: o_row = 8'h20;
      11'h748: o_row = 8'h20;
      11'h749: o_row = 8'h24;
      11'h74A: o_row = 8'h18;
      // 'u'
      11'h756: o_row = 8'h44;
      11'h757: o_row = 8'h44;
      11'h758: o_row = 8'h44;
      11'h759: o_row = 8'h4C;
      11'h75A: o_row = 8'h34;
      // 'v'
      11'h766: o_row = 8'h44;
      11'h767: o_row = 8'h44;
      11'h768: o_row = 8'h44;
      11'h769: o_row = 8'h28;
      11'h76A: o_row = 8'h10;
      // 'w'
      11'h776: o_row = 8'h44;
      11'h777: o_row = 8'h44;
      11'h778: o_row = 8'h54;
      11'h779: o_row = 8'h54;
      11'h77A: o_row = 8'h28;
      // 'x'
      11'h786: o_row = 8'h44;
      11'h787: o_row = 8'h28;
      11'h788: o_row = 8'h10;
      11'h789: o_row = 8'h28;
      11'h78A: o_row = 8'h44;
      // 'y'
      11'h796: o_row = 8'h44;
      11'h797: o_row = 8'h44;
      11'h798: o_row = 8'h3C;
      11'h799: o_row = 8'h04;
      11'h79A: o_row = 8'h38;
      // 'z'
      11'h7A6: o_row = 8'h7C;
      11'h7A7: o_row = 8'h08;
      11'h7A8: o_row = 8'h10;
      11'h7A9: o_row = 8'h20;
      11'h7AA: o_row = 8'h7C;
      default: o_row = 8'h00;
    endcase
  end

endmodule
