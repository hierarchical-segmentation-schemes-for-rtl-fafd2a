0400
0204
0406
040a
060e
0616
081e
082e
0a3e
0a5e
0c7e
0cbe
0efe
