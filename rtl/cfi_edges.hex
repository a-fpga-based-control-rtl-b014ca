// consented edges of the example firmware: @index then {valid, src, h[15:13]}
@0000 bfffc
@0281 81000
@04e6 df77d
@08c0 80a00
@0ae1 80b08
@0b50 80a80
@0bd0 80a80
@0c71 80b88
@0df1 80b88
@1011 8008c
@1016 800b5
@1812 80094
@1818 800c5
@1892 80094
